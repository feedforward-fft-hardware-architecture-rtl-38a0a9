// tb_shuffle_unit: tags every input word with (block, half, position, path)
// and checks the exchange for L = 4, 2 and 1: per block of 2L words, upper
// in U0 U1 and lower in L0 L1 must come out as upper U0 L0 and lower U1 L1,
// exactly L accepted words later; idle cycles (en low) are inserted.
module tb_shuffle_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;

  for (genvar LG = 0; LG < 3; LG++) begin : g_l
    localparam int L = 1 << LG;
    logic        phase;
    logic [15:0] a_in, b_in, a_out, b_out;
    int          beats = 0;

    shuffle_unit #(.W(16), .L(L)) dut (
      .clk(clk), .rst_n(rst_n), .en(en), .phase(phase),
      .a_in(a_in), .b_in(b_in), .a_out(a_out), .b_out(b_out)
    );

    // Tag: {block[12:0], path, half, pos[1:0]} with pos < L.
    function automatic logic [15:0] tag(int blk, int path, int half, int pos);
      return {13'(blk), 1'(path), 1'(half), 2'(pos)} ;
    endfunction

    always_comb begin
      automatic int blk  = beats / (2 * L);
      automatic int half = (beats / L) % 2;
      automatic int pos  = beats % L;
      phase = half[0];
      a_in  = tag(blk, 0, half, pos);
      b_in  = tag(blk, 1, half, pos);
    end

    always @(posedge clk) begin
      if (rst_n && en) begin
        // Output word now (before this edge) corresponds to input beat
        // beats - L; output block/half/pos from that beat number.
        automatic int ob = beats - L;
        if (ob >= 2 * L) begin
          automatic int blk  = ob / (2 * L);
          automatic int half = (ob / L) % 2;
          automatic int pos  = ob % L;
          // Upper out: half 0 -> U0[pos], half 1 -> L0[pos].
          // Lower out: half 0 -> U1[pos], half 1 -> L1[pos].
          automatic logic [15:0] ea = tag(blk, half, 0, pos);
          automatic logic [15:0] eb = tag(blk, half, 1, pos);
          checks++;
          if (a_out != ea || b_out != eb) begin
            failures++;
            if (failures < 10) $display("FAIL: L=%0d beat %0d: out %h %h expected %h %h",
                                        L, ob, a_out, b_out, ea, eb);
          end
        end
        beats <= beats + 1;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
