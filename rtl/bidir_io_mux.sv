// bidir_io_mux: bidirectional IO multiplexing circuit (top).
//
// Several modules of a chip share one pad, both for input and for output.
// That saves pads where a chip is pad-limited, and the modules need not have
// matching numbers of inputs and outputs. Modules 1..N_IN take their input
// from the pad through the distributor, steered by the control bits M1..Mc
// (port m_dist). Modules N_IN+1..N_IN+N_OUT drive the pad through the
// multiplexer, steered by Mc+1..Mn (port m_mux). The multiplexer's extra
// input W is the pad value itself. In an input state the multiplexer selects
// W, so the pad driver repeats the value already on the pad instead of
// fighting the external source or leaving the previous output on it.
//
// The defaults give the four-module example: three input modules, one output
// module, control bits (M1,M2,M3):
//   (0,0,1) input of module 1   (0,1,1) input of module 2
//   (1,0,1) input of module 3   (x,x,0) output of module 4
// Other N_IN / N_OUT values generalise it as the general structure suggests.
// The binary control encoding is this design's own choice (see
// bidir_io_pkg).
//
// DYNAMIC selects the realisation:
//   0 (default): static CMOS. All paths are combinational, with no clock and
//                no latency. The clk port is then unused.
//   1: dynamic (domino) CMOS. Every distributor output and the pad driver is
//      one domino_stage whose pull-down network computes the same function
//      as the static gate. Outputs are valid during the evaluate phase
//      (clk = 1) of the same cycle and are 0 during precharge (clk = 0);
//      this includes the pad drive.
// The pad cell itself is outside: io_i is what the pad receiver sees and
// io_o is what this circuit drives. The design follows the published
// circuit in leaving the pad driver always enabled. In input states io_o
// equals io_i. The two series inverters that buffer the pad signal have no
// logic effect and are not modelled.
module bidir_io_mux
  import bidir_io_pkg::*;
#(
  parameter int unsigned N_IN    = 3,
  parameter int unsigned N_OUT   = 1,
  parameter bit          DYNAMIC = 1'b0,
  localparam int unsigned DIST_SEL_W = dist_sel_w(N_IN),
  localparam int unsigned MUX_SEL_W  = mux_sel_w(N_OUT)
) (
  input  logic                  clk,
  input  logic [DIST_SEL_W-1:0] m_dist,
  input  logic [MUX_SEL_W-1:0]  m_mux,
  input  logic                  io_i,
  output logic                  io_o,
  output logic [N_IN-1:0]       mod_in,
  input  logic [N_OUT-1:0]      mod_out
);

  // Logic functions of the gates (static outputs, or the pull-down network
  // functions of the dynamic gates).
  logic [N_IN-1:0] dist_f;
  logic            mux_f;

  io_distributor #(.N_IN(N_IN)) u_distributor (
    .pad    (io_i),
    .sel    (m_dist),
    .mod_in (dist_f)
  );

  io_multiplexer #(.N_OUT(N_OUT)) u_multiplexer (
    .mod_out (mod_out),
    .w       (io_i),      // wire W: pad value fed back
    .sel     (m_mux),
    .pad_drv (mux_f)
  );

  if (DYNAMIC) begin : g_dynamic
    for (genvar k = 0; k < N_IN; k++) begin : g_dist
      domino_stage u_stage (.clk(clk), .pdn_on(dist_f[k]), .y(mod_in[k]));
    end
    domino_stage u_pad_stage (.clk(clk), .pdn_on(mux_f), .y(io_o));
  end else begin : g_static
    assign mod_in = dist_f;
    assign io_o   = mux_f;
  end

endmodule
