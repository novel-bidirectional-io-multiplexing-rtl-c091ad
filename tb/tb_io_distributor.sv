// tb_io_distributor: self-checking test of io_distributor.
//
// Exhaustively drives every pad value and control code, for the default
// three-input configuration and for a five-input one. It compares each module
// input with a reference worked out here: for the default, the published
// AND-gate equations of the four-module example (IO & ~M1 & ~M2, etc.); for
// five inputs, the rule "pad value if sel equals the module index, else 0".
// The circuit is combinational, so every output is checked 1 ns after its
// inputs change (zero-cycle latency).
module tb_io_distributor;
  import bidir_io_pkg::*;

  int checks = 0, failures = 0;

  logic       pad;
  logic [1:0] sel3;
  logic [2:0] mod_in3;
  logic [2:0] sel5;
  logic [4:0] mod_in5;

  io_distributor dut3 (.pad(pad), .sel(sel3), .mod_in(mod_in3));
  io_distributor #(.N_IN(5)) dut5 (.pad(pad), .sel(sel5), .mod_in(mod_in5));

  task automatic check(input string what, input logic [4:0] got, input logic [4:0] exp);
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
    logic m1, m2;
    logic [4:0] exp5;
    for (int p = 0; p < 2; p++) begin
      for (int s = 0; s < 4; s++) begin
        pad = p[0]; sel3 = s[1:0]; sel5 = 3'(s);
        m1 = sel3[1]; m2 = sel3[0];
        #1;
        check($sformatf("N_IN=3 pad=%0d M1M2=%b", p, sel3), {2'b00, mod_in3},
              {2'b00, pad & m1 & ~m2, pad & ~m1 & m2, pad & ~m1 & ~m2});
      end
      for (int s = 0; s < 8; s++) begin
        pad = p[0]; sel5 = 3'(s);
        exp5 = '0;
        if (s < 5) exp5[s] = pad;
        #1;
        check($sformatf("N_IN=5 pad=%0d sel=%0d", p, s), mod_in5, exp5);
      end
    end
    // At most one module input is ever active.
    for (int i = 0; i < 32; i++) begin
      pad = 1'b1; sel3 = 2'($urandom); sel5 = 3'($urandom);
      #1;
      checks++;
      if ($countones(mod_in3) > 1 || $countones(mod_in5) > 1) begin
        failures++;
        $display("FAIL more than one module input active");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
