// io_distributor: routes the pad value to the input of one selected module.
//
// Each module input k is the AND of the pad value with a full decode of the
// control field, so it equals the pad when sel == k and is 0 otherwise. In
// the four-module example this gives three 3-input AND gates:
//   input of module 1 = IO & ~M1 & ~M2
//   input of module 2 = IO & ~M1 &  M2
//   input of module 3 = IO &  M1 & ~M2
// (the static realisation is NAND + inverter per output). Codes >= N_IN
// select no module. The gates follow the published circuit. The binary
// generalisation to any N_IN is this design's own choice.
//
// The distributor does not look at the multiplexer's control bits. In an
// output state the pad carries the output module's data, and that data also
// reaches the module chosen by sel, exactly as in the published gates.
//
// An immediate assertion checks that at most one module input is active.
//
// Interface: pad (1 bit), sel = M1..Mc with M1 in the MSB, mod_in[k] = input
// of module k+1. Timing: purely combinational, no clock, no state.
module io_distributor
  import bidir_io_pkg::*;
#(
  parameter int unsigned N_IN = 3,
  localparam int unsigned SEL_W = dist_sel_w(N_IN)
) (
  input  logic             pad,
  input  logic [SEL_W-1:0] sel,
  output logic [N_IN-1:0]  mod_in
);

  always_comb begin
    for (int unsigned k = 0; k < N_IN; k++) begin
      mod_in[k] = pad & (sel == SEL_W'(k));
    end
  end

  // Rule of the distributor: the pad reaches at most one module at a time.
  always_comb begin
    assert ($onehot0(mod_in))
      else $error("io_distributor: more than one module input active (%b)", mod_in);
  end

endmodule
