// End-to-end testbench of the accelerator at its default size (8 x 8 CUs x 4 PEs).
// A small spiking network is run layer after layer through the host ports, the two
// neuron state buffers alternating as input and output:
//   L1 standard 3x3 conv, 12x12x8 -> 12x12x16 (two bands, two filter groups), twice:
//      time step 1 and time step 2, so the membrane potentials carry over
//   L2 pointwise conv 12x12x16 -> 12x12x16
//   L3 depthwise 3x3 conv, stride 1, in the order chosen by the workload scheduler
//   L4 average pooling 2x2, stride 2 -> 6x6x16
//   L5 depthwise 3x3 conv, stride 2 -> 6x6x16
// Every output spike map is compared with a model in the testbench that computes the
// integrate-and-fire layer directly (sum over the window, Vtemp = V + sum, fire when
// Vtemp >= Vth, reset by subtraction). The mechanisms of the design are counted and
// each must occur: systolic and unicasting steps, cascade psum transfers, skipped
// zero spikes and zero weights, stalls on busy PEs, padding, kept input rows, drain
// bubbles, scheduler sorting and fine-tuning compares.
module tb_cerebron_top;
  import cerebron_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hw_we = 0, hn_buf = 0, hn_we = 0, pp_sel = 0, start = 0, busy, done;
  logic [$clog2(W_DEPTH)-1:0] hw_addr = '0;
  wvec_t hw_wdata = '0;
  logic [$clog2(NS_DEPTH)-1:0] hn_addr = '0;
  logic [VEC-1:0] hn_wdata = '0, hn_rdata;
  layer_cfg_t cfg;
  logic [3:0] sched_iters = 4'd2;
  logic [$clog2(FMAX)-1:0] cnt_idx = '0;
  logic [15:0] cnt_val;

  cerebron_top dut (.clk, .rst_n, .hw_we, .hw_addr, .hw_wdata, .hn_buf, .hn_we, .hn_addr,
                    .hn_wdata, .hn_rdata, .cfg, .pp_sel, .sched_iters, .start, .busy, .done,
                    .cnt_idx, .cnt_val);

  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_sys, n_uni, n_psum, n_zero_spk, n_zero_w, n_stall, n_pad, n_keep, n_bubble, n_swap;
  initial begin
    n_sys = 0; n_uni = 0; n_psum = 0; n_zero_spk = 0; n_zero_w = 0; n_stall = 0;
    n_pad = 0; n_keep = 0; n_bubble = 0; n_swap = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.u_arr.step &&  dut.u_arr.systolic && dut.issue) n_sys++;
    if (dut.u_arr.step && !dut.u_arr.systolic && dut.issue) n_uni++;
    if (dut.u_arr.g_row[0].g_col[0].u_cu.psum_v[1] && dut.u_arr.g_row[0].g_col[0].u_cu.psum_r[1]) n_psum++;
    if (dut.u_arr.g_row[0].g_col[0].u_cu.g_pe[0].u_pe.load) begin
      if (dut.u_arr.g_row[0].g_col[0].u_cu.g_pe[0].u_pe.idx == '0) n_zero_spk++;
      else if (dut.u_arr.g_row[0].g_col[0].u_cu.g_pe[0].u_pe.mask_new != dut.u_arr.g_row[0].g_col[0].u_cu.g_pe[0].u_pe.idx
               && dut.u_arr.mode != PE_POOL) n_zero_w++;
    end
    if (dut.advance && dut.issue && !dut.step) n_stall++;
    if (dut.step && dut.issue && dut.u_arr.systolic && dut.std_x < 0) n_pad++;
    if (dut.u_ctrl.state == dut.u_ctrl.S_DISP && !dut.u_ctrl.need_w && dut.u_ctrl.need_rows &&
        dut.u_ctrl.loaded_hi >= dut.u_ctrl.ylo) n_keep++;
    if (dut.step && !dut.issue) n_bubble++;
    if (dut.u_sched.state == dut.u_sched.S_CMP && dut.u_sched.have_a) n_swap++;
  end

  // ---------------------------------------------------------------- network data
  localparam int HW = 12;
  int in_map [2][HW][HW][16];   // spike maps held by buffer A (0) and B (1)
  int w1 [16][3][3][8];
  int w2 [16][16];
  int wd3 [16][3][3];
  int wd5 [16][3][3];
  int v1 [HW][HW][16];
  int v2 [HW][HW][16];
  int v3 [HW][HW][16];
  int v4 [HW][HW][16];
  int v5 [HW][HW][16];

  function automatic int rnd_w();
    return ($urandom_range(0, 99) < 30) ? 0 : $signed($urandom_range(0, 23)) - 8;
  endfunction
  function automatic int sat16(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic hw_write(int a, wvec_t d);
    @(negedge clk); hw_we = 1; hw_addr = $clog2(W_DEPTH)'(a); hw_wdata = d;
    @(negedge clk); hw_we = 0;
  endtask
  task automatic hn_write(bit bsel, int a, logic [VEC-1:0] d);
    @(negedge clk); hn_we = 1; hn_buf = bsel; hn_addr = $clog2(NS_DEPTH)'(a); hn_wdata = d;
    @(negedge clk); hn_we = 0;
  endtask
  task automatic hn_read(bit bsel, int a, output logic [VEC-1:0] d);
    @(negedge clk); hn_buf = bsel; hn_addr = $clog2(NS_DEPTH)'(a);
    @(negedge clk); d = hn_rdata;
  endtask

  task automatic run_layer(layer_cfg_t c, bit in_buf);
    cfg = c; pp_sel = in_buf;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  // compare the output map in buffer ob with the expected spikes
  task automatic check_map(bit ob, int ho, int wo, int nf, int exp_map [HW][HW][16], string name);
    int bad, ones;
    bad = 0; ones = 0;
    for (int y = 0; y < ho; y++)
      for (int x = 0; x < wo; x++)
        for (int gw = 0; gw < (nf + 7) / 8; gw++) begin
          logic [VEC-1:0] d;
          hn_read(ob, (y*wo + x)*((nf+7)/8) + gw, d);
          for (int j = 0; j < 8; j++) begin
            checks++;
            if (int'(d[j]) != exp_map[y][x][gw*8+j]) begin
              failures++; bad++;
              if (bad < 6) $display("%s (%0d,%0d,%0d): got %0d expected %0d", name, y, x, gw*8+j, d[j], exp_map[y][x][gw*8+j]);
            end
            in_map[ob][y][x][gw*8+j] = int'(d[j]);
            ones += int'(d[j]);
          end
        end
    $display("%s: %0d spikes, %0d mismatches", name, ones, bad);
  endtask

  int exp_map [HW][HW][16];

  layer_cfg_t c1, c2, c3, c4, c5;

  initial begin
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // input spikes into buffer A: 12x12x8, one word per pixel
    for (int y = 0; y < HW; y++)
      for (int x = 0; x < HW; x++) begin
        logic [VEC-1:0] d;
        for (int j = 0; j < 8; j++) begin
          d[j] = ($urandom_range(0, 99) < 30);
          in_map[0][y][x][j] = int'(d[j]);
        end
        hn_write(0, y*HW + x, d);
      end
    // weights
    for (int f = 0; f < 16; f++)
      for (int ky = 0; ky < 3; ky++)
        for (int kx = 0; kx < 3; kx++) begin
          wvec_t d;
          for (int j = 0; j < 8; j++) begin w1[f][ky][kx][j] = rnd_w(); d[j] = weight_t'(w1[f][ky][kx][j]); end
          hw_write((f*9 + ky*3 + kx), d);
        end
    for (int f = 0; f < 16; f++)
      for (int g = 0; g < 2; g++) begin
        wvec_t d;
        for (int j = 0; j < 8; j++) begin w2[f][g*8+j] = rnd_w(); d[j] = weight_t'(w2[f][g*8+j]); end
        hw_write(200 + f*2 + g, d);
      end
    for (int ch = 0; ch < 16; ch++)
      for (int ky = 0; ky < 3; ky++) begin
        wvec_t d3, d5;
        d3 = '0; d5 = '0;
        for (int kx = 0; kx < 3; kx++) begin
          wd3[ch][ky][kx] = rnd_w(); d3[kx] = weight_t'(wd3[ch][ky][kx]);
          wd5[ch][ky][kx] = rnd_w(); d5[kx] = weight_t'(wd5[ch][ky][kx]);
        end
        hw_write(300 + ch*3 + ky, d3);
        hw_write(400 + ch*3 + ky, d5);
      end

    c1 = '0; c1.ltype = L_STD; c1.k = 3; c1.s = 1; c1.h = HW; c1.w = HW; c1.ho = HW; c1.wo = HW;
    c1.cg = 1; c1.f = 16; c1.vth = 16'sd20; c1.first_step = 1; c1.wbase = 0; c1.vbase = 0;
    c2 = '0; c2.ltype = L_STD; c2.k = 1; c2.s = 1; c2.h = HW; c2.w = HW; c2.ho = HW; c2.wo = HW;
    c2.cg = 2; c2.f = 16; c2.vth = 16'sd8; c2.first_step = 1; c2.wbase = 200; c2.vbase = 400;
    c3 = '0; c3.ltype = L_DW; c3.k = 3; c3.s = 1; c3.h = HW; c3.w = HW; c3.ho = HW; c3.wo = HW;
    c3.cg = 2; c3.f = 16; c3.vth = 16'sd5; c3.first_step = 1; c3.sched_en = 1; c3.wbase = 300; c3.vbase = 800;
    c4 = '0; c4.ltype = L_POOL; c4.k = 2; c4.s = 2; c4.h = HW; c4.w = HW; c4.ho = HW/2; c4.wo = HW/2;
    c4.cg = 2; c4.f = 16; c4.vth = 16'sd2; c4.first_step = 1; c4.vbase = 1200;
    c5 = '0; c5.ltype = L_DW; c5.k = 3; c5.s = 2; c5.h = HW; c5.w = HW; c5.ho = HW/2; c5.wo = HW/2;
    c5.cg = 2; c5.f = 16; c5.vth = 16'sd4; c5.first_step = 1; c5.wbase = 400; c5.vbase = 1600;

    for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) for (int f = 0; f < 16; f++) begin
      v1[y][x][f] = 0; v2[y][x][f] = 0; v3[y][x][f] = 0; v4[y][x][f] = 0; v5[y][x][f] = 0;
    end

    // ---- L1, two time steps: A -> B
    for (int t = 0; t < 2; t++) begin
      c1.first_step = (t == 0);
      run_layer(c1, 0);
      for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) for (int f = 0; f < 16; f++) begin
        int s, vt;
        s = 0;
        for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++) begin
          int yy, xx;
          yy = y + ky - 1; xx = x + kx - 1;
          if (yy >= 0 && yy < HW && xx >= 0 && xx < HW)
            for (int j = 0; j < 8; j++) if (in_map[0][yy][xx][j] != 0) s += w1[f][ky][kx][j];
        end
        vt = sat16(v1[y][x][f] + s);
        exp_map[y][x][f] = (vt >= 20);
        v1[y][x][f] = (vt >= 20) ? sat16(vt - 20) : vt;
      end
      check_map(1, HW, HW, 16, exp_map, $sformatf("L1 std3x3 t%0d", t));
    end

    // ---- L2 pointwise: B -> A
    run_layer(c2, 1);
    for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) for (int f = 0; f < 16; f++) begin
      int s, vt;
      s = 0;
      for (int ch = 0; ch < 16; ch++) if (in_map[1][y][x][ch] != 0) s += w2[f][ch];
      vt = sat16(v2[y][x][f] + s);
      exp_map[y][x][f] = (vt >= 8);
      v2[y][x][f] = (vt >= 8) ? sat16(vt - 8) : vt;
    end
    check_map(0, HW, HW, 16, exp_map, "L2 pointwise");

    // ---- L3 depthwise with scheduling: A -> B
    run_layer(c3, 0);
    for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) for (int ch = 0; ch < 16; ch++) begin
      int s, vt;
      s = 0;
      for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++) begin
        int yy, xx;
        yy = y + ky - 1; xx = x + kx - 1;
        if (yy >= 0 && yy < HW && xx >= 0 && xx < HW && in_map[0][yy][xx][ch] != 0) s += wd3[ch][ky][kx];
      end
      vt = sat16(v3[y][x][ch] + s);
      exp_map[y][x][ch] = (vt >= 5);
      v3[y][x][ch] = (vt >= 5) ? sat16(vt - 5) : vt;
    end
    check_map(1, HW, HW, 16, exp_map, "L3 depthwise");

    // ---- L4 average pooling 2x2: B -> A
    run_layer(c4, 1);
    for (int y = 0; y < HW/2; y++) for (int x = 0; x < HW/2; x++) for (int ch = 0; ch < 16; ch++) begin
      int s, vt;
      s = 0;
      for (int ky = 0; ky < 2; ky++) for (int kx = 0; kx < 2; kx++) s += in_map[1][2*y+ky][2*x+kx][ch];
      vt = sat16(v4[y][x][ch] + s);
      exp_map[y][x][ch] = (vt >= 2);
      v4[y][x][ch] = (vt >= 2) ? sat16(vt - 2) : vt;
    end
    check_map(0, HW/2, HW/2, 16, exp_map, "L4 avgpool");

    // ---- L5 depthwise stride 2 on the L3 output (buffer B): B -> A
    run_layer(c5, 1);
    for (int y = 0; y < HW/2; y++) for (int x = 0; x < HW/2; x++) for (int ch = 0; ch < 16; ch++) begin
      int s, vt;
      s = 0;
      for (int ky = 0; ky < 3; ky++) for (int kx = 0; kx < 3; kx++) begin
        int yy, xx;
        yy = 2*y + ky - 1; xx = 2*x + kx - 1;
        if (yy >= 0 && yy < HW && xx >= 0 && xx < HW && in_map[1][yy][xx][ch] != 0) s += wd5[ch][ky][kx];
      end
      vt = sat16(v5[y][x][ch] + s);
      exp_map[y][x][ch] = (vt >= 4);
      v5[y][x][ch] = (vt >= 4) ? sat16(vt - 4) : vt;
    end
    check_map(0, HW/2, HW/2, 16, exp_map, "L5 depthwise s2");

    $display("mechanisms: systolic %0d unicast %0d psum %0d zero-spike %0d zero-weight %0d stall %0d pad %0d kept-rows %0d bubbles %0d fine-tune compares %0d",
             n_sys, n_uni, n_psum, n_zero_spk, n_zero_w, n_stall, n_pad, n_keep, n_bubble, n_swap);
    checks += 10;
    if (n_sys == 0) failures++;
    if (n_uni == 0) failures++;
    if (n_psum == 0) failures++;
    if (n_zero_spk == 0) failures++;
    if (n_zero_w == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_pad == 0) failures++;
    if (n_keep == 0) failures++;
    if (n_bubble == 0) failures++;
    if (n_swap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
