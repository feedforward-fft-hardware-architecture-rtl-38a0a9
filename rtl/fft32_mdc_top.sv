// fft32_mdc_top: 32-point, 4-parallel, radix-2 feedforward (MDC) FFT,
// decimation in frequency, with rotators placed by rotator allocation.
//
// Four complex samples enter per beat; one 32-point FFT takes 8 beats and
// FFTs follow each other back to back. Five stages, each with two radix-2
// butterflies working on paths 0/1 and 2/3:
//   stage 1: butterflies, general rotators on paths 1 and 3, shuffle L=4
//   stage 2: butterflies, general rotators on paths 1 and 3, shuffle L=2
//   stage 3: butterflies, trivial (-j) rotator on path 1, general rotator
//            on path 3, shuffle L=1
//   stage 4: butterflies, paths 1 and 2 crossed, trivial rotator (always -j)
//            on path 3
//   stage 5: butterflies
// Which index bits are serial and which parallel at each stage (fft_pkg) is
// what makes the rotator sets small: the stage-1 rotators see 3 and 2 sets
// of angles, the stage-2 ones 2 and 1, the stage-3 general one 1. The kind of
// rotator on each path is derived here from those sets, not listed by hand.
// Each general rotator is four radix-8 modified Booth multipliers with a
// rotation memory addressed by the stage's cycle number.
//
// Input order: in beat t (0..7) of a frame, path p carries x[n] with
// n = fft_pkg::index_of(1, t, p), i.e. paths 0..3 carry x[2t], x[2t+16],
// x[2t+1], x[2t+17]. Output order: in output beat t, path p carries X[k]
// with k = bitrev(index_of(5, t, p)); out_bin gives k for every path.
//
// Arithmetic: inputs are DW_IN-bit signed; a guard bit is added at the
// input and every butterfly adds one bit, so outputs are DW_IN+6 bits and
// cannot overflow. Rotators keep their width and round half up. No scaling:
// the output is the plain DFT sum X(k) = sum x(n) W^(nk) up to rounding.
//
// Timing: one register after the butterflies/rotators of each stage plus
// the shuffle buffers give a latency of fft_pkg::LATENCY = 12 beats; the
// pipeline moves only in beats (in_valid high). out_valid pulses the cycle
// after each beat whose output is meaningful.
// The stage layouts, rotator placement and kinds, buffer lengths and the
// stage-4 crossing follow the published architecture; data widths, rounding,
// the per-stage register and the in_valid handshake are this design's own.
module fft32_mdc_top
  import fft_pkg::*;
#(
  parameter int DW_IN = 8,              // input sample width (re and im)
  parameter int CW    = 21,             // rotation coefficient width
  localparam int DW_OUT = DW_IN + LOG2N + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DW_IN-1:0]  in_re  [P],
  input  logic signed [DW_IN-1:0]  in_im  [P],
  output logic                     out_valid,
  output logic                     out_first,    // output beat 0 of an FFT
  output logic signed [DW_OUT-1:0] out_re [P],
  output logic signed [DW_OUT-1:0] out_im [P],
  output logic [LOG2N-1:0]         out_bin [P]   // k of X[k] on each path
);

  logic [TW-1:0] beat, out_beat;

  mdc_control #(.FRAME(FRAME), .LATENCY(LATENCY)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .beat(beat), .out_valid(out_valid), .out_beat(out_beat)
  );

  assign out_first = out_valid && (out_beat == '0);

  for (genvar p = 0; p < P; p++) begin : g_bin
    logic [LOG2N-1:0] bin_tab [FRAME];
    for (genvar t = 0; t < FRAME; t++) begin : g_t
      assign bin_tab[t] = LOG2N'(bitrev(index_of(LOG2N, t, p)));
    end
    assign out_bin[p] = bin_tab[out_beat];
  end

  for (genvar s = 1; s <= LOG2N; s++) begin : g_st
    localparam int DI = DW_IN + s;      // stage input width
    localparam int DO = DI + 1;         // butterfly output width
    localparam int L  = shuffle_len(s);

    logic signed [DI-1:0] x_re [P], x_im [P];
    logic signed [DO-1:0] b_re [P], b_im [P];   // after butterflies
    logic signed [DO-1:0] r_re [P], r_im [P];   // after rotators
    logic signed [DO-1:0] c_re [P], c_im [P];   // after the stage-4 cross
    logic signed [DO-1:0] q_re [P], q_im [P];   // stage register
    logic signed [DO-1:0] o_re [P], o_im [P];   // stage output

    // Stage input.
    for (genvar p = 0; p < P; p++) begin : g_in
      if (s == 1) begin : g_port
        assign x_re[p] = DI'(in_re[p]);
        assign x_im[p] = DI'(in_im[p]);
      end else begin : g_prev
        assign x_re[p] = g_st[s-1].o_re[p];
        assign x_im[p] = g_st[s-1].o_im[p];
      end
    end

    // Butterflies on paths 0/1 and 2/3.
    for (genvar k = 0; k < P / 2; k++) begin : g_bf
      butterfly_r2 #(.DW(DI)) u_bf (
        .a_re(x_re[2*k]),   .a_im(x_im[2*k]),
        .b_re(x_re[2*k+1]), .b_im(x_im[2*k+1]),
        .s_re(b_re[2*k]),   .s_im(b_im[2*k]),
        .d_re(b_re[2*k+1]), .d_im(b_im[2*k+1])
      );
    end

    // Rotators. Stage 4's path-3 rotation is applied after the cross (the
    // crossed paths 1 and 2 carry no rotation, path 3 keeps its place).
    // t_bf: cycle number, in this stage's layout, of the samples at the
    // butterflies; it addresses the rotation memories.
    for (genvar p = 0; p < P; p++) begin : g_rot
      localparam rot_kind_e KIND = rot_kind(s, p);
      if (KIND == ROT_GENERAL) begin : g_gen
        logic [TW-1:0] t_bf;
        assign t_bf = beat - TW'(stage_offset(s));
        logic signed [CW-1:0] cc, ww;
        logic signed [CW+1:0] cc3, ww3;
        rotation_memory #(.STAGE(s), .PATH(p), .CW(CW)) u_mem (
          .t(t_bf), .c(cc), .w(ww), .c3(cc3), .w3(ww3)
        );
        general_rotator #(.DW(DO), .CW(CW)) u_rot (
          .x_re(b_re[p]), .x_im(b_im[p]),
          .c(cc), .w(ww), .c3(cc3), .w3(ww3),
          .y_re(r_re[p]), .y_im(r_im[p])
        );
      end else if (KIND == ROT_TRIVIAL) begin : g_triv
        logic [TW-1:0] t_bf;
        assign t_bf = beat - TW'(stage_offset(s));
        logic ctl_tab [FRAME];
        for (genvar t = 0; t < FRAME; t++) begin : g_t
          assign ctl_tab[t] = (rotation_of(s, index_of(s, t, p)) == N / 4);
        end
        trivial_rotator #(.DW(DO)) u_rot (
          .rot(ctl_tab[t_bf]),
          .x_re(b_re[p]), .x_im(b_im[p]),
          .y_re(r_re[p]), .y_im(r_im[p])
        );
      end else begin : g_none
        assign r_re[p] = b_re[p];
        assign r_im[p] = b_im[p];
      end
    end

    // Fixed permutation between stages 4 and 5: paths 1 and 2 cross.
    if (s == LOG2N - 1) begin : g_cross
      assign c_re = '{r_re[0], r_re[2], r_re[1], r_re[3]};
      assign c_im = '{r_im[0], r_im[2], r_im[1], r_im[3]};
    end else begin : g_straight
      assign c_re = r_re;
      assign c_im = r_im;
    end

    // Stage register.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int p = 0; p < P; p++) begin
          q_re[p] <= '0;
          q_im[p] <= '0;
        end
      end else if (in_valid) begin
        q_re <= c_re;
        q_im <= c_im;
      end
    end

    // Shuffling circuits of stages 1..3.
    if (L > 0) begin : g_shuf
      logic [TW-1:0] t_sh;
      assign t_sh = beat - TW'(stage_offset(s) + 1);
      for (genvar k = 0; k < P / 2; k++) begin : g_pair
        logic [2*DO-1:0] a_o, b_o;
        shuffle_unit #(.W(2 * DO), .L(L)) u_sh (
          .clk(clk), .rst_n(rst_n), .en(in_valid),
          .phase(t_sh[$clog2(L)]),
          .a_in({q_re[2*k], q_im[2*k]}), .b_in({q_re[2*k+1], q_im[2*k+1]}),
          .a_out(a_o), .b_out(b_o)
        );
        assign {o_re[2*k],   o_im[2*k]}   = a_o;
        assign {o_re[2*k+1], o_im[2*k+1]} = b_o;
      end
    end else begin : g_noshuf
      assign o_re = q_re;
      assign o_im = q_im;
    end
  end

  assign out_re = g_st[LOG2N].o_re;
  assign out_im = g_st[LOG2N].o_im;

endmodule
