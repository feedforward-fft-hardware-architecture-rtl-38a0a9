// shuffle_unit: data shuffling circuit between two MDC stages (buffer, two
// multiplexers, buffer).
//
// It exchanges the parallel index bit that tells the upper path (a) from the
// lower path (b) with the serial index bit of weight L in the cycle number.
// The lower input first passes an L-sample buffer; two multiplexers then
// either pass the upper input up and the buffered lower input down (while
// 'phase', the weight-L bit of the input cycle number, is 0) or cross them
// (phase = 1); the upper multiplexer output finally passes a second
// L-sample buffer. Per block of 2L samples: upper in U0 U1, lower in L0 L1
// give upper out U0 L0 and lower out U1 L1, L samples later.
// Everything moves only on 'en'.
// The buffer / multiplexer / buffer arrangement follows the published
// architecture; the multiplexer control is derived from the index layouts.
module shuffle_unit #(
  parameter int W = 20,                 // bits per complex sample
  parameter int L = 4                   // buffer length
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         phase,           // weight-L bit of the input cycle
  input  logic [W-1:0] a_in,            // upper input
  input  logic [W-1:0] b_in,            // lower input
  output logic [W-1:0] a_out,
  output logic [W-1:0] b_out
);

  logic [W-1:0] b_del, top_mux;

  delay_buffer #(.W(W), .L(L)) u_low (
    .clk(clk), .rst_n(rst_n), .en(en), .d(b_in), .q(b_del)
  );

  assign top_mux = phase ? b_del : a_in;
  assign b_out   = phase ? a_in  : b_del;

  delay_buffer #(.W(W), .L(L)) u_up (
    .clk(clk), .rst_n(rst_n), .en(en), .d(top_mux), .q(a_out)
  );

endmodule
