// bidir_io_pkg: shared constants and helpers of the bidirectional IO
// multiplexing circuit.
//
// A chip of p modules shares one pad. Modules 1..e receive from the pad
// through the distributor, which is steered by control bits M1..Mc. Modules
// e+1..p send to the pad through the multiplexer, which is steered by control
// bits Mc+1..Mn. This package gives the width of both control fields as a
// function of the module counts. It also gives the working states of the
// four-module example, in which modules 1-3 take input and module 4 gives
// output.
//
// Control field encoding (this design's generalisation of the example):
//   distributor: code k (0 <= k < N_IN) selects module k+1; codes >= N_IN
//                select none. With N_IN = 3 this is (M1,M2) = 00/01/10 for
//                modules 1/2/3, with M1 as the MSB, as in the example's
//                state table.
//   multiplexer: code k (0 <= k < N_OUT) selects module e+1+k; codes
//                >= N_OUT select the feedback wire W. With N_OUT = 1 this is
//                M3 = 0 for module 4 and M3 = 1 for W, as in the example.
package bidir_io_pkg;

  // Width of the distributor control field M1..Mc (at least one bit).
  function automatic int unsigned dist_sel_w(input int unsigned n_in);
    return (n_in > 1) ? $clog2(n_in) : 1;
  endfunction

  // Width of the multiplexer control field Mc+1..Mn: one code per output
  // module plus at least one code for the feedback wire W.
  function automatic int unsigned mux_sel_w(input int unsigned n_out);
    return (n_out > 0) ? $clog2(n_out + 1) : 1;
  endfunction

  // Working states of the four-module example, control bits (M1,M2,M3) with
  // M1 as the MSB. In the output state, M1 and M2 are don't-cares; the
  // encoding below takes them as 0.
  typedef enum logic [2:0] {
    ST_IN_MODULE1  = 3'b001,
    ST_IN_MODULE2  = 3'b011,
    ST_IN_MODULE3  = 3'b101,
    ST_OUT_MODULE4 = 3'b000
  } example_state_e;

endpackage
