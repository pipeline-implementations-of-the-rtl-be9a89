// commutator2: the 2x2 switch of a multi-path delay commutator pipeline.
//
// With swap low the two inputs go straight ahead (a -> top, b -> bottom); with swap high
// they are sent crisscross (a -> bottom, b -> top). The pipeline drives swap from one bit
// of its sample counter, so the switch toggles every D samples. Combinational.
module commutator2
  import fft_pkg::*;
(
  input  logic  swap,
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t top,
  output cplx_t bottom
);

  assign top    = swap ? b : a;
  assign bottom = swap ? a : b;

endmodule
