// delay_buffer: L-sample buffer of the data shuffling circuits (the boxes
// marked 4, 2 and 1 in the architecture).
//
// A shift register of L words of W bits. It moves by one word whenever 'en'
// is high, so the delay is L accepted samples, not L clock cycles; with 'en'
// low the contents hold. Contents reset to zero.
// The buffer lengths are the published ones; the enable and reset are this
// design's own.
module delay_buffer #(
  parameter int W = 20,
  parameter int L = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] mem [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) mem[i] <= '0;
    end else if (en) begin
      mem[0] <= d;
      for (int i = 1; i < L; i++) mem[i] <= mem[i-1];
    end
  end

  assign q = mem[L-1];

endmodule
