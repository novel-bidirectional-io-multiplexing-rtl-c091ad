// tb_bidir_io_mux_variants: end-to-end tests of bidir_io_mux in its other
// configurations, each driven by its own bidir_io_scenario:
//   dyn3x1 : the four-module example in the dynamic (domino) realisation;
//   sta4x3 : static, four input modules and three output modules;
//   dyn5x2 : dynamic, five input modules and two output modules
//            (three unused distributor codes, exercised as idle states).
// Passes when all three scenarios report no failure.
module tb_bidir_io_mux_variants;
  import bidir_io_pkg::*;

  // --- dynamic, 3 inputs, 1 output -----------------------------------------
  logic       a_clk, a_io_i, a_io_o, a_m_mux, a_mod_out, a_done;
  logic [1:0] a_m_dist;
  logic [2:0] a_mod_in;
  int         a_checks, a_failures;

  bidir_io_mux #(.N_IN(3), .N_OUT(1), .DYNAMIC(1'b1)) dut_dyn3x1 (
    .clk(a_clk), .m_dist(a_m_dist), .m_mux(a_m_mux), .io_i(a_io_i), .io_o(a_io_o),
    .mod_in(a_mod_in), .mod_out(a_mod_out)
  );
  bidir_io_scenario #(.N_IN(3), .N_OUT(1), .DYNAMIC(1'b1), .N_OPS(40), .SEED(11)) sc_dyn3x1 (
    .clk(a_clk), .m_dist(a_m_dist), .m_mux(a_m_mux), .io_i(a_io_i), .io_o(a_io_o),
    .mod_in(a_mod_in), .mod_out(a_mod_out), .done(a_done), .checks(a_checks), .failures(a_failures)
  );

  // --- static, 4 inputs, 3 outputs ------------------------------------------
  logic       b_clk, b_io_i, b_io_o, b_done;
  logic [1:0] b_m_dist, b_m_mux;
  logic [3:0] b_mod_in;
  logic [2:0] b_mod_out;
  int         b_checks, b_failures;

  bidir_io_mux #(.N_IN(4), .N_OUT(3), .DYNAMIC(1'b0)) dut_sta4x3 (
    .clk(b_clk), .m_dist(b_m_dist), .m_mux(b_m_mux), .io_i(b_io_i), .io_o(b_io_o),
    .mod_in(b_mod_in), .mod_out(b_mod_out)
  );
  bidir_io_scenario #(.N_IN(4), .N_OUT(3), .DYNAMIC(1'b0), .N_OPS(60), .SEED(23)) sc_sta4x3 (
    .clk(b_clk), .m_dist(b_m_dist), .m_mux(b_m_mux), .io_i(b_io_i), .io_o(b_io_o),
    .mod_in(b_mod_in), .mod_out(b_mod_out), .done(b_done), .checks(b_checks), .failures(b_failures)
  );

  // --- dynamic, 5 inputs, 2 outputs -----------------------------------------
  logic       c_clk, c_io_i, c_io_o, c_done;
  logic [2:0] c_m_dist;
  logic [1:0] c_m_mux;
  logic [4:0] c_mod_in;
  logic [1:0] c_mod_out;
  int         c_checks, c_failures;

  bidir_io_mux #(.N_IN(5), .N_OUT(2), .DYNAMIC(1'b1)) dut_dyn5x2 (
    .clk(c_clk), .m_dist(c_m_dist), .m_mux(c_m_mux), .io_i(c_io_i), .io_o(c_io_o),
    .mod_in(c_mod_in), .mod_out(c_mod_out)
  );
  bidir_io_scenario #(.N_IN(5), .N_OUT(2), .DYNAMIC(1'b1), .N_OPS(80), .SEED(37)) sc_dyn5x2 (
    .clk(c_clk), .m_dist(c_m_dist), .m_mux(c_m_mux), .io_i(c_io_i), .io_o(c_io_o),
    .mod_in(c_mod_in), .mod_out(c_mod_out), .done(c_done), .checks(c_checks), .failures(c_failures)
  );

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks,
             a_failures + b_failures + c_failures + 1);
    $finish;
  end

  initial begin
    wait (a_done && b_done && c_done);
    $display("dyn3x1: checks=%0d failures=%0d", a_checks, a_failures);
    $display("sta4x3: checks=%0d failures=%0d", b_checks, b_failures);
    $display("dyn5x2: checks=%0d failures=%0d", c_checks, c_failures);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks + c_checks,
             a_failures + b_failures + c_failures);
    $finish;
  end
endmodule
