// Self-checking testbench of the reconfigurable PE (stand-alone and pooling modes).
// Random neurons of 1..4 items with sparse spikes and weights are fed as fast as the
// PE accepts them. The testbench recomputes the aligned-pair sum, the firing decision
// and the reset-by-subtraction potential, and checks the latency: each item costs
// max(1, aligned pairs) cycles and the last one its aligned pairs.
module tb_pe;
  import cerebron_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  pe_mode_e mode;
  vmem_t vth, vmem_rd;
  logic first_step, ready, load, first, last;
  logic [VEC-1:0] idx;
  wvec_t w;
  meta_t meta_in;
  logic out_valid, out_spike, busy, pir, pov;
  vmem_t out_vmem;
  meta_t out_meta;
  logic [23:0] pout;

  pe dut (.clk, .rst_n, .mode, .vth, .first_step, .ready, .load, .idx, .w, .first, .last,
          .meta_in, .vmem_rdata(vmem_rd), .psum_in('0), .psum_in_valid(1'b0), .psum_in_ready(pir),
          .psum_out(pout), .psum_out_valid(pov), .psum_out_ready(1'b0),
          .out_valid, .out_spike, .out_vmem, .out_meta, .busy);

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

  logic [VEC-1:0] t_idx [4];
  wvec_t          t_w   [4];

  initial begin
    load = 0; first = 0; last = 0; idx = '0; w = '0; meta_in = '0;
    mode = PE_ALONE; vth = 16'sd100; vmem_rd = '0; first_step = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 400; trial++) begin
      int n, sum, expc, e0, i, p;
      bit got;
      vmem_t v0, vt, vexp;
      bit sp;
      mode       = (trial % 4 == 3) ? PE_POOL : PE_ALONE;
      first_step = (trial % 7 == 5);
      n   = 1 + $urandom_range(0, 3);
      v0  = vmem_t'($signed($urandom_range(0, 400)) - 200);
      vth = (mode == PE_POOL) ? vmem_t'(4) : vmem_t'($urandom_range(1, 300));
      vmem_rd = v0;
      sum = 0; expc = 0;
      for (int k = 0; k < n; k++) begin
        for (int j = 0; j < VEC; j++) begin
          t_idx[k][j] = ($urandom_range(0, 99) < 30);
          t_w[k][j]   = ($urandom_range(0, 99) < 25) ? 8'sd0 : weight_t'($urandom_range(0, 255));
        end
        p = 0;
        for (int j = 0; j < VEC; j++)
          if (t_idx[k][j] && (mode == PE_POOL || t_w[k][j] != 0)) begin
            p++;
            sum += (mode == PE_POOL) ? 1 : int'(t_w[k][j]);
          end
        expc += (k == n-1) ? p : ((p > 0) ? p : 1);
      end
      vt   = sat((first_step ? 0 : int'(v0)) + sum);
      sp   = (vt >= vth);
      vexp = sp ? sat(int'(vt) - int'(vth)) : vt;
      i = 0; got = 0; e0 = 0;
      while (!got) begin
        @(negedge clk);
        if (out_valid) begin
          got = 1;
          checks++;
          if (out_spike !== sp || out_vmem !== vexp) begin
            failures++;
            $display("trial %0d mode %0d: spike %0b/%0b vmem %0d/%0d", trial, mode, out_spike, sp, out_vmem, vexp);
          end
          checks++;
          if (cyc - e0 != expc) begin
            failures++;
            $display("trial %0d: latency %0d expected %0d", trial, cyc - e0, expc);
          end
          checks++;
          if (out_meta.vaddr != VAW'(trial)) failures++;
        end
        if (i < n && ready) begin
          load = 1; idx = t_idx[i]; w = t_w[i]; first = (i == 0); last = (i == n-1);
          meta_in = '0; meta_in.vaddr = VAW'(trial);
          if (i == 0) e0 = cyc + 1;
          i++;
        end else begin
          load = 0;
        end
      end
      load = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
