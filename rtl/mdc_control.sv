// mdc_control: timing of the feedforward FFT pipeline.
//
// Every input cycle with in_valid high is one beat: the whole pipeline moves
// by one sample per path and 'beat' (the cycle number within the current
// input frame, 0..FRAME-1) advances. The first beat after reset is cycle 0 of
// the first frame; frames follow each other with no gap in beats, though any
// number of idle clock cycles may sit between beats. The result of a beat
// reaches the output register at the clock edge that ends it, so out_valid
// is a registered one-cycle pulse after each beat once the pipeline holds
// data (LATENCY beats), and out_beat is the output frame cycle it carries.
// The published design does not describe its controller; this counter is
// the simplest that drives the memories and shuffles. rst_n is used both as
// the asynchronous reset and to disable the assertion during reset.
module mdc_control #(
  parameter int FRAME   = 8,
  parameter int LATENCY = 12,
  localparam int TW = $clog2(FRAME),
  localparam int FW = $clog2(LATENCY + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic [TW-1:0] beat,       // input cycle number of the current beat
  output logic          out_valid,
  output logic [TW-1:0] out_beat    // output cycle number of out_* now
);

  logic [FW-1:0] filled;            // beats accepted, saturating at LATENCY-1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat      <= '0;
      filled    <= '0;
      out_valid <= 1'b0;
      out_beat  <= '0;
    end else begin
      out_valid <= in_valid && (filled == FW'(LATENCY - 1));
      if (in_valid) begin
        beat     <= (beat == TW'(FRAME - 1)) ? '0 : beat + 1'b1;
        out_beat <= beat + TW'(1 - LATENCY);
        if (filled != FW'(LATENCY - 1)) filled <= filled + 1'b1;
      end
    end
  end

  // An output pulse always follows an accepted beat.
  a_valid_after_beat: assert property (
    @(posedge clk) disable iff (!rst_n) out_valid |-> $past(in_valid)
  );

endmodule
