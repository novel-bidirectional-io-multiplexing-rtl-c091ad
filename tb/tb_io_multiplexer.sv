// tb_io_multiplexer: self-checking test of io_multiplexer.
//
// Default configuration (one output module, control bit M3): all eight
// combinations of M3, module output and W are checked against the published
// gate equation (~M3 & out4) | (M3 & W). A three-output configuration (two
// control bits) is checked against "code k < 3 picks output k, code 3 picks
// W". Combinational: every output is checked 1 ns after its inputs change.
module tb_io_multiplexer;
  import bidir_io_pkg::*;

  int checks = 0, failures = 0;

  logic       w;
  logic       m3, out4, drv1;
  logic [2:0] outs;
  logic [1:0] sel3;
  logic       drv3;

  io_multiplexer dut1 (.mod_out(out4), .w(w), .sel(m3), .pad_drv(drv1));
  io_multiplexer #(.N_OUT(3)) dut3 (.mod_out(outs), .w(w), .sel(sel3), .pad_drv(drv3));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 8; v++) begin
      {m3, out4, w} = 3'(v);
      #1;
      check($sformatf("M3=%b out4=%b W=%b", m3, out4, w), drv1, (~m3 & out4) | (m3 & w));
    end
    for (int v = 0; v < 128; v++) begin
      {sel3, outs, w} = 6'(v);
      exp = (sel3 == 2'd3) ? w : outs[sel3];
      #1;
      check($sformatf("N_OUT=3 sel=%0d outs=%b W=%b", sel3, outs, w), drv3, exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
