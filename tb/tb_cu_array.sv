// Self-checking testbench of the CU array.
// Systolic mode (cascade PEs): a stream of one-item neurons enters the left edge of
// every row; each column answers the weight-bus tag with that column's own weights.
// Every CU must fire once per item, with the sum of its row's spikes times its
// column's weights, and in item order; column c must see item i c steps after column 0.
// Unicasting mode (stand-alone PEs): every CU gets its own item and every PE fires.
// Bubbles drain the pipeline and `idle` must rise at the end.
module tb_cu_array;
  import cerebron_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic systolic, advance, step, idle;
  pe_mode_e mode;
  item_t [N-1:0] sys_in;
  item_t [N-1:0][M-1:0] uni_in;
  logic [M-1:0][TAGW-1:0] col_tag;
  wvec_t [M-1:0][L-1:0] col_w;
  logic [N-1:0][M-1:0][L-1:0] vre, ov, os;
  logic [N-1:0][M-1:0][L-1:0][VAW-1:0] vra;
  vmem_t [N-1:0][M-1:0][L-1:0] vrd, ovm;
  meta_t [N-1:0][M-1:0][L-1:0] om;

  cu_array dut (.clk, .rst_n, .systolic, .mode, .vth(16'sd30), .first_step(1'b1), .advance, .step, .idle,
                .sys_in, .uni_in, .col_tag, .col_w, .vmem_re(vre), .vmem_raddr(vra), .vmem_rdata(vrd),
                .out_valid(ov), .out_spike(os), .out_vmem(ovm), .out_meta(om));

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NI = 24;
  wvec_t wt [M][16][L];
  logic [L-1:0][VEC-1:0] sidx [NI][N];           // systolic items per row
  logic [L-1:0][VEC-1:0] uidx [N][M];            // unicast items per CU
  int next_i [N][M];
  int step_of [NI];                              // step number at which column 0 took item i
  int nstep;
  int nout;

  always_comb
    for (int c = 0; c < M; c++)
      for (int l = 0; l < L; l++) col_w[c][l] = wt[c][col_tag[c][3:0]][l];

  always @(posedge clk) if (step) nstep++;

  function automatic int dotp(logic [VEC-1:0] ix, wvec_t ww);
    int s;
    s = 0;
    for (int j = 0; j < VEC; j++) if (ix[j] && ww[j] != 0) s += int'(ww[j]);
    return s;
  endfunction

  task automatic check_fire(int r, int c, int l, int s);
    vmem_t vt, ve;
    bit sp;
    vt = vmem_t'(s);
    sp = vt >= 30;
    ve = sp ? vmem_t'(vt - 30) : vt;
    checks++;
    if (os[r][c][l] !== sp || ovm[r][c][l] !== ve) begin
      failures++;
      $display("CU(%0d,%0d) PE %0d: spike %0b/%0b vmem %0d/%0d", r, c, l, os[r][c][l], sp, ovm[r][c][l], ve);
    end
  endtask

  initial begin
    systolic = 1; mode = PE_CASCADE; advance = 0; sys_in = '0; uni_in = '0; vrd = '0;
    nstep = 0; nout = 0;
    for (int c = 0; c < M; c++) for (int t = 0; t < 16; t++) for (int l = 0; l < L; l++)
      for (int j = 0; j < VEC; j++) wt[c][t][l][j] = ($urandom_range(0, 3) == 0) ? 8'sd0 : weight_t'($signed($urandom_range(0, 30)) - 10);
    for (int i = 0; i < NI; i++) for (int r = 0; r < N; r++) for (int l = 0; l < L; l++)
      for (int j = 0; j < VEC; j++) sidx[i][r][l][j] = ($urandom_range(0, 3) == 0);
    for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) next_i[r][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---------------- systolic mode
    for (int i = 0; i < NI + M + 4; ) begin
      @(negedge clk);
      // outputs
      for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) begin
        for (int l = 0; l < L-1; l++) if (ov[r][c][l]) begin failures++; $display("non-tail fire"); end
        if (ov[r][c][L-1]) begin
          int it, s;
          it = int'(om[r][c][L-1].vaddr);
          checks++;
          if (it != next_i[r][c]) begin failures++; $display("CU(%0d,%0d) item %0d, expected %0d", r, c, it, next_i[r][c]); end
          next_i[r][c] = it + 1;
          s = 0;
          for (int l = 0; l < L; l++) s += dotp(sidx[it][r][l], wt[c][it % 16][l]);
          check_fire(r, c, L-1, s);
          nout++;
        end
      end
      advance = 1;
      for (int r = 0; r < N; r++) begin
        sys_in[r] = '0;
        if (i < NI) begin
          sys_in[r].valid = 1; sys_in[r].first = 1; sys_in[r].last = 1; sys_in[r].en = '1;
          sys_in[r].idx = sidx[i][r]; sys_in[r].tag = TAGW'(i % 16); sys_in[r].meta.vaddr = VAW'(i);
        end
      end
      #1;
      if (step) begin
        if (i < NI) step_of[i] = nstep;
        i++;
      end
    end
    advance = 1; sys_in = '0;
    while (!idle) begin
      @(negedge clk);
      for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) if (ov[r][c][L-1]) begin
        int it, s;
        it = int'(om[r][c][L-1].vaddr);
        s = 0;
        for (int l = 0; l < L; l++) s += dotp(sidx[it][r][l], wt[c][it % 16][l]);
        check_fire(r, c, L-1, s);
        checks++;
        if (it != next_i[r][c]) failures++;
        next_i[r][c] = it + 1;
        nout++;
      end
    end
    checks++;
    if (nout != N*M*NI) begin failures++; $display("systolic firings %0d expected %0d", nout, N*M*NI); end
    checks++;
    if (step_of[NI-1] - step_of[0] != NI-1) failures++;

    // ---------------- unicasting mode
    @(negedge clk);
    systolic = 0; mode = PE_ALONE; advance = 0; nout = 0;
    for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) for (int l = 0; l < L; l++)
      for (int j = 0; j < VEC; j++) uidx[r][c][l][j] = ($urandom_range(0, 2) == 0);
    for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) begin
      uni_in[r][c] = '0; uni_in[r][c].valid = 1; uni_in[r][c].first = 1; uni_in[r][c].last = 1;
      uni_in[r][c].en = '1; uni_in[r][c].idx = uidx[r][c]; uni_in[r][c].tag = TAGW'(c);
    end
    advance = 1;
    #1;
    while (!step) begin @(negedge clk); #1; end
    @(negedge clk); advance = 0; uni_in = '0;
    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < N; r++) for (int c = 0; c < M; c++) for (int l = 0; l < L; l++)
        if (ov[r][c][l]) begin
          check_fire(r, c, l, dotp(uidx[r][c][l], wt[c][c][l]));
          nout++;
        end
      @(negedge clk);
    end
    checks++;
    if (nout != N*M*L) begin failures++; $display("unicast firings %0d", nout); end
    checks++;
    if (!idle) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
