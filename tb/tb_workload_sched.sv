// Self-checking testbench of the workload scheduling unit.
// Spike counts are accumulated through the M column ports, then a schedule is
// computed for F = 64 channels (8 rounds of 8) with two fine-tuning passes. The
// testbench runs its own model of sorting/regrouping, fine tuning and adjusting and
// compares the whole scheduling table, the accumulated counts and the latency
// R*M + T*M*(R+1) cycles. A channel count that is not a multiple of M must give the
// identity table.
module tb_workload_sched;
  import cerebron_pkg::*;
  localparam int FAW = $clog2(FMAX);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic clear = 0, start = 0, busy, done;
  logic [M-1:0] acc_en = '0;
  logic [M-1:0][FAW-1:0] acc_ch = '0;
  logic [M-1:0][5:0] acc_n = '0;
  logic [FAW:0] f;
  logic [3:0] iters;
  logic [M-1:0][FAW-1:0] tab_idx, tab_ch;
  logic [15:0] cnt_rd;
  logic [FAW-1:0] cnt_rd_idx;

  workload_sched dut (.clk, .rst_n, .clear, .acc_en, .acc_ch, .acc_n, .start, .f, .iters,
                      .busy, .done, .tab_idx, .tab_ch, .cnt_rd, .cnt_rd_idx);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cnt [64];
  int tab [64];

  task automatic model(int nf, int t);
    int r;
    r = nf / M;
    for (int j = 0; j < r; j++)
      for (int e = 0; e < M; e++) begin
        int rank;
        rank = 0;
        for (int k = 0; k < M; k++)
          if (cnt[j*M+k] < cnt[j*M+e] || (cnt[j*M+k] == cnt[j*M+e] && k < e)) rank++;
        tab[rank*r + j] = j*M + e;
      end
    for (int it = 0; it < t; it++) begin
      int ma, pa;
      ma = -1; pa = 0;
      for (int li = 0; li < M; li++) begin
        int ms, ps;
        ms = -1; ps = 0;
        for (int p = 0; p < r; p++)
          if (p == 0 || cnt[tab[li*r+p]] > ms) begin ms = cnt[tab[li*r+p]]; ps = li*r+p; end
        if (li == 0) begin ma = ms; pa = ps; end
        else if (ma > ms) begin
          int tmp;
          tmp = tab[pa]; tab[pa] = tab[ps]; tab[ps] = tmp;
          pa = ps;
        end else begin ma = ms; pa = ps; end
      end
    end
  endtask

  initial begin
    int e0;
    f = 64; iters = 2; tab_idx = '0; cnt_rd_idx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) cnt[i] = 0;
    // accumulate: 40 cycles of random spikes from every column
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      for (int c = 0; c < M; c++) begin
        int ch, n;
        ch = c + M * $urandom_range(0, 7);
        n  = $urandom_range(0, 5) * ((ch % 5) + 1) / 2;
        acc_en[c] = (n > 0); acc_ch[c] = FAW'(ch); acc_n[c] = 6'(n);
        cnt[ch] += n;
      end
    end
    @(negedge clk); acc_en = '0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      cnt_rd_idx = FAW'(i); #1;
      checks++;
      if (int'(cnt_rd) != cnt[i]) begin failures++; $display("count %0d: %0d/%0d", i, cnt_rd, cnt[i]); end
    end
    model(64, 2);
    @(negedge clk); start = 1; e0 = cyc + 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - e0 != 8*M + 2*M*(8+1)) begin
      failures++; $display("latency %0d", cyc - e0);
    end
    for (int g = 0; g < 8; g++) begin
      for (int c = 0; c < M; c++) tab_idx[c] = FAW'(g*M + c);
      #1;
      for (int c = 0; c < M; c++) begin
        checks++;
        if (int'(tab_ch[c]) != tab[g*M+c]) begin
          failures++; $display("table %0d: %0d/%0d", g*M+c, tab_ch[c], tab[g*M+c]);
        end
      end
    end
    // clearing, then a channel count that is not a multiple of M
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    cnt_rd_idx = FAW'(9); #1; checks++; if (cnt_rd != 0) failures++;
    f = 12;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int c = 0; c < M; c++) tab_idx[c] = FAW'(c + 3);
    #1;
    for (int c = 0; c < M; c++) begin
      checks++; if (int'(tab_ch[c]) != c + 3) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
