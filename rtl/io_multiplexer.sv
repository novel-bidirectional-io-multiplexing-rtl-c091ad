// io_multiplexer: picks the value driven onto the shared pad.
//
// The control field chooses either the output of one output module or the
// feedback wire W, which carries the pad's own value. Choosing W in the input
// states makes the pad driver repeat what the external source already puts
// on the pad. So the driver never fights that source, and a value left over
// from the previous output state cannot disturb the next input state. For
// the four-module example (N_OUT = 1, control bit M3) this is the published
// AND-OR gate:
//   pad_drv = (~M3 & output_of_module_4) | (M3 & W)
// The mapping of codes >= N_OUT to W when N_OUT > 1 is this design's own
// generalisation.
//
// Interface: mod_out[k] = output of module e+1+k, w = pad value, sel =
// Mc+1..Mn, pad_drv = value to drive. Timing: purely combinational.
module io_multiplexer
  import bidir_io_pkg::*;
#(
  parameter int unsigned N_OUT = 1,
  localparam int unsigned SEL_W = mux_sel_w(N_OUT)
) (
  input  logic [N_OUT-1:0] mod_out,
  input  logic             w,
  input  logic [SEL_W-1:0] sel,
  output logic             pad_drv
);

  always_comb begin
    pad_drv = w;
    for (int unsigned k = 0; k < N_OUT; k++) begin
      if (sel == SEL_W'(k)) pad_drv = mod_out[k];
    end
  end

endmodule
