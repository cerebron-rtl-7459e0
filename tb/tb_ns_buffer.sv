// Self-checking testbench of the neuron state buffer: word writes from the host port,
// word reads on both ports one cycle later, and single-bit spike writes from several
// write ports in the same cycle without disturbing the other bits of the word.
module tb_ns_buffer;
  import cerebron_pkg::*;
  localparam int D = 256, NW = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we = 0;
  logic [7:0] a_addr = 0, b_addr = 0;
  logic [VEC-1:0] a_wdata = 0, a_rdata, b_rdata;
  logic [NW-1:0] s_we = 0, s_bit = 0;
  logic [NW-1:0][10:0] s_addr = '0;
  ns_buffer #(.DEPTH(D), .NWP(NW)) dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_addr, .b_rdata, .s_we, .s_addr, .s_bit);
  int checks = 0, failures = 0;
  logic [VEC-1:0] model [D];
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_we = 1; a_addr = 8'(i); a_wdata = VEC'($urandom); model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        int a;
        a = p * 512 + $urandom_range(0, 511);   // ports hit different words
        s_we[p] = $urandom_range(0, 1); s_addr[p] = 11'(a); s_bit[p] = $urandom_range(0, 1);
        if (s_we[p]) model[a / 8][a % 8] = s_bit[p];
      end
    end
    @(negedge clk); s_we = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_addr = 8'(i); b_addr = 8'(D - 1 - i);
      @(negedge clk);
      checks += 2;
      if (a_rdata !== model[i]) failures++;
      if (b_rdata !== model[D-1-i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
