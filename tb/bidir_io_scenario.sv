// bidir_io_scenario: stimulus, pad model, module models and checker for an
// end-to-end test of bidir_io_mux. A testbench connects it to one instance
// of bidir_io_mux.
//
// The scenario plays the chip around the circuit:
//   * the pad net: when an external device drives the pad (input states)
//     the pad carries its value, otherwise the value driven by the circuit;
//   * input modules 1..N_IN: each shifts in the bit on its input every cycle
//     of an operation addressed to it;
//   * output modules N_IN+1..N_IN+N_OUT: the addressed one sends a word bit
//     by bit; the others put random noise on their outputs;
//   * the external device: sends words in input states and captures the pad
//     in output states.
// One operation moves one WORD-bit word in one working state, one bit per
// clock cycle. Operations alternate between input and output states first,
// so that every module and both mode switches occur, and then follow in
// random order, with an occasional idle control code if one exists.
//
// Checked every cycle, against values worked out here and not taken from
// the circuit:
//   * the selected module input equals the pad bit, all others are 0;
//   * in input states the pad driver repeats the pad value (wire W), also
//     in the first cycle after an output state that left the opposite value;
//   * in output states the pad carries the selected module's bit. The
//     distributor also hands that bit to the module its control bits select,
//     as the published gates do.
// Checked per operation: the word received equals the word sent, within
// exactly WORD cycles (one bit per cycle, same-cycle delivery).
// With DYNAMIC = 1, outputs are sampled late in the evaluate phase
// (clk = 1). Each precharge phase is checked to hold every output at 0.
// Mechanism counters (states, mode switches, W repeats, idle codes) must
// all be non-zero at the end, or a failure is counted.
module bidir_io_scenario
  import bidir_io_pkg::*;
#(
  parameter int unsigned N_IN    = 3,
  parameter int unsigned N_OUT   = 1,
  parameter bit          DYNAMIC = 1'b0,
  parameter int unsigned N_OPS   = 40,
  parameter int unsigned WORD    = 8,
  parameter int unsigned SEED    = 1,
  localparam int unsigned DIST_SEL_W = dist_sel_w(N_IN),
  localparam int unsigned MUX_SEL_W  = mux_sel_w(N_OUT)
) (
  output logic                  clk,
  output logic [DIST_SEL_W-1:0] m_dist,
  output logic [MUX_SEL_W-1:0]  m_mux,
  output logic                  io_i,
  input  logic                  io_o,
  input  logic [N_IN-1:0]       mod_in,
  output logic [N_OUT-1:0]      mod_out,
  output logic                  done,
  output int                    checks,
  output int                    failures
);

  localparam bit HAS_IDLE = (N_IN < (1 << DIST_SEL_W));

  // Pad net: the external device wins while it drives.
  logic ext_en, ext_val;
  assign io_i = ext_en ? ext_val : io_o;

  int n_in_state[N_IN];
  int n_out_state[N_OUT];
  // mechanism counters
  typedef enum int {
    SW_IN_TO_OUT, SW_OUT_TO_IN, W_REPEAT, W_CLEAN_SWITCH, IDLE, DIST_IN_OUT_STATE,
    PRECHARGE, N_MECH
  } mech_e;
  int n_mech[N_MECH];

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0h expected %0h", what, $time, got, exp);
    end
  endtask

  initial begin
    int unsigned seed_dummy;
    bit prev_is_out, first_op, last_pad_bit;
    int cycles;
    done = 1'b0; checks = 0; failures = 0;
    clk = 1'b0; ext_en = 1'b1; ext_val = 1'b0;
    m_dist = '0; m_mux = MUX_SEL_W'(N_OUT); mod_out = '0;
    foreach (n_mech[i]) n_mech[i] = 0;
    foreach (n_in_state[i]) n_in_state[i] = 0;
    foreach (n_out_state[i]) n_out_state[i] = 0;
    seed_dummy = $urandom(SEED);
    prev_is_out = 1'b0; first_op = 1'b1; last_pad_bit = 1'b0;

    for (int op = 0; op < int'(N_OPS); op++) begin
      bit is_out, is_idle;
      int unsigned target, dsel;
      logic [WORD-1:0] word, got;
      // choose the working state
      is_idle = 1'b0;
      if (op < int'(2 * (N_IN + N_OUT))) begin
        is_out = op[0];
        target = is_out ? (op / 2) % N_OUT : (op / 2) % N_IN;
      end else begin
        is_out = $urandom_range(0, 1) == 1;
        target = is_out ? $urandom_range(0, N_OUT - 1) : $urandom_range(0, N_IN - 1);
        if (!is_out && HAS_IDLE && $urandom_range(0, 5) == 0) is_idle = 1'b1;
      end
      word = WORD'({$urandom, $urandom});
      // make the first bit differ from the previous pad bit at out->in switches
      if (!first_op && prev_is_out && !is_out) word[0] = ~last_pad_bit;
      if (is_out) begin
        dsel = $urandom_range(0, (1 << DIST_SEL_W) - 1);
      end else if (is_idle) begin
        dsel = $urandom_range(N_IN, (1 << DIST_SEL_W) - 1);
      end else begin
        dsel = target;
      end
      if (!first_op) begin
        if (prev_is_out && !is_out) n_mech[SW_OUT_TO_IN]++;
        if (!prev_is_out && is_out) n_mech[SW_IN_TO_OUT]++;
      end
      got = '0;
      cycles = 0;
      for (int b = 0; b < int'(WORD); b++) begin
        logic [N_IN-1:0] exp_in;
        logic exp_pad;
        // precharge half: change inputs
        clk = 1'b0;
        m_dist = DIST_SEL_W'(dsel);
        m_mux = is_out ? MUX_SEL_W'(target) : MUX_SEL_W'(N_OUT + $urandom_range(0, (1 << MUX_SEL_W) - 1 - N_OUT));
        mod_out = N_OUT'($urandom);
        if (is_out) mod_out[target] = word[b];
        ext_en = !is_out;
        ext_val = is_out ? 1'b0 : word[b];
        exp_pad = word[b];
        exp_in = '0;
        if (dsel < N_IN) exp_in[dsel] = exp_pad;
        #4;
        if (DYNAMIC) begin
          check("precharge: module inputs low", 64'(mod_in), 64'(0));
          check("precharge: pad drive low", 64'(io_o), 64'(0));
          n_mech[PRECHARGE]++;
        end
        // evaluate half
        clk = 1'b1;
        #4;
        cycles++;
        check($sformatf("op %0d bit %0d: pad value", op, b), 64'(io_i), 64'(exp_pad));
        check($sformatf("op %0d bit %0d: module inputs", op, b), 64'(mod_in), 64'(exp_in));
        if (!is_out) begin
          check($sformatf("op %0d bit %0d: W repeat", op, b), 64'(io_o), 64'(io_i));
          n_mech[W_REPEAT]++;
          if (b == 0 && prev_is_out && !first_op) n_mech[W_CLEAN_SWITCH]++;
          if (!is_idle) got[b] = mod_in[target];   // input module captures
        end else begin
          got[b] = io_i;                           // external device captures
          if (dsel < N_IN) n_mech[DIST_IN_OUT_STATE]++;
        end
        last_pad_bit = exp_pad;
        #1;
      end
      check($sformatf("op %0d: cycles per word", op), 64'(cycles), 64'(WORD));
      if (is_idle) begin
        n_mech[IDLE]++;
      end else begin
        check($sformatf("op %0d: word %s module %0d", op, is_out ? "from" : "to",
                        is_out ? N_IN + target + 1 : target + 1), 64'(got), 64'(word));
        if (is_out) n_out_state[target]++;
        else        n_in_state[target]++;
      end
      prev_is_out = is_out;
      first_op = 1'b0;
    end
    clk = 1'b0;

    // every mechanism must have happened
    foreach (n_in_state[i]) begin
      $display("  input of module %0d: %0d words", i + 1, n_in_state[i]);
      check($sformatf("input state of module %0d exercised", i + 1), 64'(n_in_state[i] > 0), 64'(1));
    end
    foreach (n_out_state[i]) begin
      $display("  output of module %0d: %0d words", N_IN + i + 1, n_out_state[i]);
      check($sformatf("output state of module %0d exercised", N_IN + i + 1), 64'(n_out_state[i] > 0), 64'(1));
    end
    $display("  switches input->output %0d, output->input %0d", n_mech[SW_IN_TO_OUT], n_mech[SW_OUT_TO_IN]);
    $display("  W repeats %0d, clean output->input switches %0d", n_mech[W_REPEAT], n_mech[W_CLEAN_SWITCH]);
    $display("  distributor fed in output state %0d, idle codes %0d, precharge checks %0d",
             n_mech[DIST_IN_OUT_STATE], n_mech[IDLE], n_mech[PRECHARGE]);
    check("mode switch input->output exercised", 64'(n_mech[SW_IN_TO_OUT] > 0), 64'(1));
    check("mode switch output->input exercised", 64'(n_mech[SW_OUT_TO_IN] > 0), 64'(1));
    check("W repeat exercised", 64'(n_mech[W_REPEAT] > 0), 64'(1));
    check("W clean switch exercised", 64'(n_mech[W_CLEAN_SWITCH] > 0), 64'(1));
    check("distributor in output state exercised", 64'(n_mech[DIST_IN_OUT_STATE] > 0), 64'(1));
    if (HAS_IDLE) check("idle code exercised", 64'(n_mech[IDLE] > 0), 64'(1));
    if (DYNAMIC)  check("precharge exercised", 64'(n_mech[PRECHARGE] > 0), 64'(1));
    done = 1'b1;
  end

endmodule
