// tb_domino_stage: self-checking test of the dynamic-gate model.
//
// Runs a 10 ns clock (5 ns precharge with clk = 0, 5 ns evaluate with
// clk = 1). Checks that the output is 0 throughout precharge whatever the
// pull-down input does. It also checks that during evaluate the output
// rises in the same phase as the pull-down network turns on, that the
// discharged node is held after the network turns off again, and that an
// evaluate phase with the network off leaves the output at 0 (keeper holds
// the node).
module tb_domino_stage;

  int checks = 0, failures = 0;
  int evaluations = 0, holds = 0;

  logic clk = 1'b0;
  logic pdn_on = 1'b0;
  logic y;

  domino_stage dut (.clk(clk), .pdn_on(pdn_on), .y(y));

  task automatic check(input string what, input logic exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s at %0t: y=%b expected %b", what, $time, y, exp);
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
    logic [2:0] pat;
    for (int c = 0; c < 64; c++) begin
      // pattern of pdn_on over the evaluate phase: 3 sub-intervals
      pat = 3'($urandom);
      if (c < 8) pat = 3'(c);
      // precharge phase
      clk = 1'b0;
      pdn_on = pat[0];
      #1 check("precharge", 1'b0);
      pdn_on = ~pdn_on;
      #4 check("precharge end", 1'b0);
      // evaluate phase
      clk = 1'b1;
      pdn_on = pat[0];
      #1 check("evaluate 1", pat[0]);
      pdn_on = pat[1];
      #2 check("evaluate 2", |pat[1:0]);
      pdn_on = pat[2];
      #2 check("evaluate 3", |pat);
      if (|pat) evaluations++;
      if (pat[0] && !pat[2]) holds++;
    end
    clk = 1'b0;
    #1 check("final precharge", 1'b0);
    checks++;
    if (evaluations == 0 || holds == 0) begin
      failures++;
      $display("FAIL mechanisms not exercised: evaluations=%0d holds=%0d", evaluations, holds);
    end
    $display("domino: evaluations=%0d keeper/held discharges=%0d", evaluations, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
