// tb_ro_puf -- checks the ring-oscillator PUF with a 32-oscillator model
// whose frequencies are a random permutation of evenly spaced values.
// Initialise: every response bit must be the comparison of the pair with the
// largest frequency distance among its K candidates, and the mask must mark
// that pair. Re-generate after a small drift: same response, measuring only
// the masked pairs. Both run times are checked against the pair count.
module tb_ro_puf;
  localparam int N = 32, K = 4, NB = 8, W = 512;
  localparam logic [31:0] BASE = 32'h1999_9999;  // 0.1 of the clock rate
  localparam logic [31:0] STEP = 32'h0200_0000;  // 4 counts per rank over W

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, regen = 1'b0;
  logic [N-1:0] ro;
  logic [NB*K-1:0] mask_in, mask_out, mask_init;
  logic [NB-1:0] response, resp_init;
  logic busy, done;
  int checks = 0, failures = 0;
  int rank [N];

  ro_puf #(.N_OSC(N), .K_MASK(K), .N_BITS(NB), .WINDOW(W)) dut (.*);
  ro_array_model #(.N(N)) u_ro (.clk(clk), .ro(ro));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic rg, input logic [NB*K-1:0] m, output int cyc);
    @(negedge clk);
    regen = rg; mask_in = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  function automatic int absd(int x);
    return x < 0 ? -x : x;
  endfunction

  initial begin
    int cyc, skipped;
    mask_in = '0;
    // random permutation of ranks
    for (int i = 0; i < N; i++) rank[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(i);
      t = rank[i]; rank[i] = rank[j]; rank[j] = t;
    end
    for (int i = 0; i < N; i++) u_ro.inc[i] = BASE + STEP * rank[i];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run(1'b0, '0, cyc);
    checks++;
    if (cyc != 1 + NB*K*(W + 5)) begin failures++; $display("FAIL init cycles %0d", cyc); end
    skipped = 0;
    for (int b = 0; b < NB; b++) begin
      int best, bd, ties;
      best = 0; bd = -1; ties = 0;
      for (int c = 0; c < K; c++) begin
        int p, a, q, d;
        p = b*K + c; a = p % N; q = (p + N/2 - 1) % N;
        d = absd(rank[a] - rank[q]);
        if (d > bd) begin bd = d; best = c; ties = 0; end
        else if (d == bd) ties++;
      end
      if (ties != 0) begin skipped++; continue; end
      begin
        int p, a, q;
        p = b*K + best; a = p % N; q = (p + N/2 - 1) % N;
        checks++;
        if (response[b] !== (rank[a] > rank[q])) begin failures++; $display("FAIL bit %0d", b); end
        checks++;
        if (mask_out[b*K +: K] !== K'(1 << best)) begin
          failures++; $display("FAIL mask %0d: %b best %0d", b, mask_out[b*K +: K], best);
        end
      end
    end
    if (skipped != 0) $display("note: %0d bits with tied candidates not compared", skipped);
    resp_init = response;
    mask_init = mask_out;

    // environmental drift: every oscillator slows a little, by different amounts
    for (int i = 0; i < N; i++) u_ro.inc[i] = u_ro.inc[i] - (u_ro.inc[i] >> 6) - 32'($urandom_range(0, 32'h0040_0000));
    skipped = 0;  // candidates passed over before the masked one, one cycle each
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < K; c++) if (mask_init[b*K + c]) skipped += c;
    run(1'b1, mask_init, cyc);
    checks++;
    if (response !== resp_init) begin failures++; $display("FAIL regen %b vs %b", response, resp_init); end
    checks++;
    if (mask_out !== mask_init) begin failures++; $display("FAIL regen mask"); end
    checks++;
    if (cyc != 1 + NB*(W + 5) + skipped) begin failures++; $display("FAIL regen cycles %0d", cyc); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
