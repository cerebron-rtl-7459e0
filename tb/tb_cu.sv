// Self-checking testbench of the computing unit.
// Cascade mode: random neurons whose items spread the channels over the L PEs; only
// the tail PE may fire, with the sum of all L partial sums plus the potential.
// Stand-alone mode: each PE must fire its own neuron with its own sum. The lock-step
// step cost (the slowest PE per step, then PE 0's own last item) is checked in
// stand-alone mode.
module tb_cu;
  import cerebron_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  pe_mode_e mode;
  vmem_t vth;
  logic ready, busy, load;
  item_t item;
  wvec_t [L-1:0] w;
  logic [L-1:0] vre, ov, os;
  logic [L-1:0][VAW-1:0] vra;
  vmem_t [L-1:0] vrd, ovm;
  meta_t [L-1:0] om;

  cu dut (.clk, .rst_n, .mode, .vth, .first_step(1'b0), .ready, .busy, .load, .item, .w,
          .vmem_re(vre), .vmem_raddr(vra), .vmem_rdata(vrd),
          .out_valid(ov), .out_spike(os), .out_vmem(ovm), .out_meta(om));

  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vmem_t sat(int v);
    if (v > 32767) return 16'sd32767;
    if (v < -32768) return -16'sd32768;
    return vmem_t'(v);
  endfunction

  logic [L-1:0][VEC-1:0] t_idx [3];
  wvec_t [L-1:0]         t_w   [3];

  initial begin
    load = 0; item = '0; w = '0; mode = PE_CASCADE; vth = 16'sd50; vrd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 300; trial++) begin
      int n, i, nfired, e0, expc;
      int sum [L];
      int tot;
      vmem_t v0;
      mode = (trial % 2) ? PE_ALONE : PE_CASCADE;
      n  = 1 + $urandom_range(0, 2);
      v0 = vmem_t'($signed($urandom_range(0, 200)) - 100);
      vth = vmem_t'($urandom_range(1, 200));
      for (int l = 0; l < L; l++) vrd[l] = v0;
      for (int l = 0; l < L; l++) sum[l] = 0;
      expc = 0;
      for (int k = 0; k < n; k++) begin
        int pm;
        pm = 0;
        for (int l = 0; l < L; l++) begin
          int p;
          p = 0;
          for (int j = 0; j < VEC; j++) begin
            t_idx[k][l][j] = ($urandom_range(0, 99) < 35);
            t_w[k][l][j]   = ($urandom_range(0, 99) < 20) ? 8'sd0 : weight_t'($urandom_range(0, 255));
            if (t_idx[k][l][j] && t_w[k][l][j] != 0) begin
              sum[l] += int'(t_w[k][l][j]);
              p++;
            end
          end
          if (p > pm) pm = p;
          if (k == n-1 && l == 0) expc += p;
        end
        if (k != n-1) expc += (pm > 0) ? pm : 1;
      end
      tot = 0;
      for (int l = 0; l < L; l++) tot += sum[l];
      i = 0; nfired = 0; e0 = 0;
      while (nfired < ((mode == PE_CASCADE) ? 1 : L)) begin
        @(negedge clk);
        for (int l = 0; l < L; l++) if (ov[l]) begin
          vmem_t vt, ve;
          bit sp;
          vt = sat(int'(v0) + ((mode == PE_CASCADE) ? tot : sum[l]));
          sp = vt >= vth;
          ve = sp ? sat(int'(vt) - int'(vth)) : vt;
          nfired++;
          checks++;
          if (mode == PE_CASCADE && l != L-1) begin
            failures++; $display("trial %0d: non-tail PE %0d fired in cascade mode", trial, l);
          end
          if (os[l] !== sp || ovm[l] !== ve) begin
            failures++;
            $display("trial %0d mode %0d PE %0d: spike %0b/%0b vmem %0d/%0d", trial, mode, l, os[l], sp, ovm[l], ve);
          end
          if (mode == PE_ALONE && l == 0) begin
            checks++;
            if (cyc - e0 != expc) begin
              failures++; $display("trial %0d: latency %0d expected %0d", trial, cyc - e0, expc);
            end
          end
        end
        if (i < n && ready) begin
          load = 1;
          item = '0; item.valid = 1; item.first = (i == 0); item.last = (i == n-1);
          item.en = '1; item.idx = t_idx[i]; w = t_w[i];
          if (i == 0) e0 = cyc + 1;
          i++;
        end else load = 0;
      end
      load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
