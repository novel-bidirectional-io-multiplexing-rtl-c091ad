// tb_bidir_io_mux: end-to-end test of the bidirectional IO multiplexing
// circuit at its default configuration (four modules: inputs of modules 1-3
// and output of module 4 share one pad, static realisation).
//
// Two instances of the default top are tested:
//   dut       : bidir_io_scenario plays the pad, the four modules and the
//               external device. It moves 60 eight-bit words through every
//               working state, across both kinds of mode switch, and checks
//               every bit and word against its own reference (see
//               bidir_io_scenario).
//   dut_table : directed check of the control-bit table of the example. Each
//               of the four working states (with every value of the two
//               don't-care bits in the output state) is applied with every
//               pad / module-4 value. The outputs are compared with the
//               state's meaning: which module gets the pad value and what
//               drives the pad.
module tb_bidir_io_mux;
  import bidir_io_pkg::*;

  logic       clk;
  logic [1:0] m_dist;
  logic       m_mux;
  logic       io_i, io_o;
  logic [2:0] mod_in;
  logic       mod_out;
  logic       done;
  int         checks, failures;

  bidir_io_mux dut (
    .clk     (clk),
    .m_dist  (m_dist),
    .m_mux   (m_mux),
    .io_i    (io_i),
    .io_o    (io_o),
    .mod_in  (mod_in),
    .mod_out (mod_out)
  );

  bidir_io_scenario #(.N_IN(3), .N_OUT(1), .DYNAMIC(1'b0), .N_OPS(60), .SEED(7)) scenario (
    .clk(clk), .m_dist(m_dist), .m_mux(m_mux), .io_i(io_i), .io_o(io_o),
    .mod_in(mod_in), .mod_out(mod_out), .done(done), .checks(checks), .failures(failures)
  );

  // --- directed table check ---------------------------------------------------
  example_state_e state;
  logic [2:0]     ctrl;          // (M1, M2, M3), M1 the MSB
  logic           t_ext_en, t_ext_val, t_io_i, t_io_o, t_mod_out;
  logic [2:0]     t_mod_in;
  int             t_checks = 0, t_failures = 0;

  assign t_io_i = t_ext_en ? t_ext_val : t_io_o;   // pad net

  bidir_io_mux dut_table (
    .clk     (1'b0),
    .m_dist  (ctrl[2:1]),
    .m_mux   (ctrl[0]),
    .io_i    (t_io_i),
    .io_o    (t_io_o),
    .mod_in  (t_mod_in),
    .mod_out (t_mod_out)
  );

  task automatic t_check(input string what, input logic [2:0] got, input logic [2:0] exp);
    t_checks++;
    if (got !== exp) begin
      t_failures++;
      $display("FAIL table %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin : table_check
    state = state.first();
    do begin
      for (int dc = 0; dc < 4; dc++) begin
        for (int v = 0; v < 4; v++) begin
          logic [2:0] exp_in;
          ctrl = state;
          if (state == ST_OUT_MODULE4) ctrl[2:1] = 2'(dc);   // don't-care bits
          t_ext_en  = (state != ST_OUT_MODULE4);
          t_ext_val = v[0];
          t_mod_out = v[1];
          #1;
          exp_in = '0;
          case (state)
            ST_IN_MODULE1: exp_in[0] = v[0];
            ST_IN_MODULE2: exp_in[1] = v[0];
            ST_IN_MODULE3: exp_in[2] = v[0];
            default: if (dc < 3) exp_in[dc] = v[1];  // pad carries module 4's bit
          endcase
          t_check($sformatf("%s dc=%0d v=%0d inputs", state.name(), dc, v), t_mod_in, exp_in);
          t_check($sformatf("%s dc=%0d v=%0d pad", state.name(), dc, v), 3'(t_io_o),
                  3'((state == ST_OUT_MODULE4) ? v[1] : v[0]));
        end
        if (state != ST_OUT_MODULE4) break;
      end
      state = state.next();
    end while (state != state.first());
  end

  initial begin : watchdog
    #1000000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + t_checks, failures + t_failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("table: checks=%0d failures=%0d", t_checks, t_failures);
    // 3 input states x 4 values + output state x 4 don't-cares x 4 values, 2 checks each
    t_checks++;
    if (t_checks != 2 * (3 * 4 + 4 * 4) + 1) begin
      t_failures++;
      $display("FAIL table: not every state was applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + t_checks, failures + t_failures);
    $finish;
  end
endmodule
