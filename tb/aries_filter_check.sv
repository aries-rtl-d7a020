// aries_filter_check: builds a 2-D filter from ROWS x BPR Aries blocks and
// checks it against a software convolution.
//
// Each image row r has its own sample stream.  Along a row, BPR blocks are
// chained through their cascade outputs, so block k of the row sees the
// samples 5k..5k+4 places back; the filter is KW = ROWS x (5*BPR) taps wide
// at most.  The block results are added in a pipelined tree made only of the
// blocks' own final adders, arranged by the usual rule for these blocks:
// split the operand list in halves until groups of two or three remain; a
// group of three uses modes (delay, internal) / (no delay, internal) /
// (no delay, external); when any group of three exists, both blocks of each
// group of two are delayed.  Free final adders (the first block of a pair
// and the last block of a triple) then add the group sums level by level.
// The routing is computed at time 0 and applied through multiplexers.
// Coefficients are random signed values (two's complement mode); taps beyond
// KTAPS in a row get coefficient 0.  The tree output is compared every data
// cycle with the sum, modulo 2**16, of each block's truncated result.
module aries_filter_check #(
  parameter int ROWS   = 5,
  parameter int BPR    = 1,
  parameter int KTAPS  = 5,       // taps used per row
  parameter int CYCLES = 400
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   modes_used,
  output logic done
);
  localparam int NB = ROWS * BPR;
  localparam int NH = 2048;

  logic        mode = 0;
  logic [4:0]  ext_addr = 0;
  logic [9:0]  wr_data [NB];
  logic [7:0]  din [NB];
  logic [15:0] ext_a [NB], ext_b [NB];
  logic        dsel [NB], isel [NB];
  logic        sample_en [NB];
  logic [7:0]  casc [NB];
  logic [15:0] res [NB], sm [NB];

  // Routing: source kind 0 = zero, 1 = result of block, 2 = sum of block.
  int a_kind [NB], a_src [NB], b_kind [NB], b_src [NB];
  int out_blk, tree_lat;
  int coef [NB][5];
  logic [7:0] xs [ROWS][NH];
  int m = 0;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    aries_block u (
      .clk, .rst_n, .mode, .tc(1'b1), .delay_sel(dsel[i]), .input_sel(isel[i]),
      .din(din[i]), .ext_addr, .wr_data(wr_data[i]), .ext_a(ext_a[i]), .ext_b(ext_b[i]),
      .sample_en(sample_en[i]), .cascade_out(casc[i]), .result(res[i]), .sum(sm[i])
    );
  end

  always_comb begin
    for (int i = 0; i < NB; i++) begin
      ext_a[i] = a_kind[i] == 1 ? res[a_src[i]] : a_kind[i] == 2 ? sm[a_src[i]] : 16'd0;
      ext_b[i] = b_kind[i] == 1 ? res[b_src[i]] : b_kind[i] == 2 ? sm[b_src[i]] : 16'd0;
    end
  end

  // Tree construction -----------------------------------------------------
  int free_pool [$];
  bit any_triple;

  function automatic bit has_triple(input int n);
    if (n == 3) return 1;
    if (n == 2) return 0;
    return has_triple(n / 2) || has_triple(n - n / 2);
  endfunction

  // Returns the block whose sum holds the total of blocks lo..lo+n-1 and
  // the number of adder levels above the groups.
  function automatic int build(input int lo, input int n, output int levels);
    int l1, l2, v1, v2, f;
    if (n == 2) begin
      dsel[lo] = any_triple; isel[lo] = 1; free_pool.push_back(lo);
      dsel[lo+1] = any_triple; isel[lo+1] = 0; a_kind[lo+1] = 1; a_src[lo+1] = lo;
      levels = 0;
      return lo + 1;
    end
    if (n == 3) begin
      dsel[lo+2] = 0; isel[lo+2] = 1; free_pool.push_back(lo + 2);
      dsel[lo+1] = 0; isel[lo+1] = 0; a_kind[lo+1] = 1; a_src[lo+1] = lo + 2;
      dsel[lo]   = 1; isel[lo]   = 0; a_kind[lo]   = 2; a_src[lo]   = lo + 1;
      levels = 0;
      return lo;
    end
    v1 = build(lo, n / 2, l1);
    v2 = build(lo + n / 2, n - n / 2, l2);
    if (l1 != l2) $display("unbalanced tree at %0d/%0d", lo, n);
    f = free_pool.pop_front();
    a_kind[f] = 2; a_src[f] = v1; b_kind[f] = 2; b_src[f] = v2;
    levels = l1 + 1;
    return f;
  endfunction

  function automatic int window(input int b, input int k);
    int s, r, off;
    s = 0; r = b / BPR; off = 5 * (b % BPR);
    for (int j = 0; j < 5; j++) s += coef[b][j] * int'(xs[r][k - off - j]);
    return s;
  endfunction

  function automatic logic [15:0] expected(input int e);
    logic [15:0] acc;
    logic [16:0] f;
    acc = 0;
    for (int b = 0; b < NB; b++) begin
      f = 17'(window(b, e - 2));
      acc = acc + f[16:1];
    end
    return acc;
  endfunction

  initial begin
    int lv;
    checks = 0; failures = 0; done = 0; modes_used = 0;
    for (int i = 0; i < NB; i++) begin
      a_kind[i] = 0; b_kind[i] = 0; a_src[i] = 0; b_src[i] = 0;
      dsel[i] = 0; isel[i] = 0; din[i] = 0; wr_data[i] = 0;
      for (int j = 0; j < 5; j++)
        coef[i][j] = (5 * (i % BPR) + j < KTAPS) ? int'($urandom % 101) - 50 : 0;
    end
    any_triple = has_triple(NB);
    out_blk = build(0, NB, lv);
    // Block result: 2 data cycles after its newest sample; group sum: 2 more
    // (delay register or first adder, then the group's last adder); then one
    // data cycle per tree level.
    tree_lat = 4 + lv;
    begin
      bit seen [4];
      for (int i = 0; i < NB; i++) seen[{dsel[i], isel[i]}] = 1;
      for (int q = 0; q < 4; q++) modes_used += int'(seen[q]);
    end
    @(posedge rst_n);
    // Load every block's table in one initialization.
    @(negedge clk);
    mode = 1;
    repeat (2) @(negedge clk);
    for (int w = 0; w < 32; w++) begin
      ext_addr = 5'(w);
      for (int b = 0; b < NB; b++) begin
        int s;
        s = 0;
        for (int j = 0; j < 5; j++) if (w[j]) s += coef[b][j];
        wr_data[b] = 10'(s);
      end
      repeat (2) @(negedge clk);
    end
    mode = 0;
    repeat (4) @(negedge clk);
    for (int n = 0; n < CYCLES; n++) begin
      while (!sample_en[0]) @(negedge clk);
      m++;
      for (int r = 0; r < ROWS; r++) begin
        xs[r][m] = 8'($urandom);
        for (int k = 0; k < BPR; k++) din[r * BPR + k] = (k == 0) ? xs[r][m] : casc[r * BPR + k - 1];
      end
      @(posedge clk);
      #1;
      if (m > 5 * BPR + 2 + tree_lat) begin
        logic [15:0] e;
        e = expected(m - tree_lat + 2);
        checks++;
        if (sm[out_blk] !== e) begin
          failures++;
          if (failures < 5) $display("FAIL %0dx%0d edge %0d: %h exp %h", ROWS, BPR, m, sm[out_blk], e);
        end
      end
      @(negedge clk);
    end
    done = 1;
  end
endmodule
