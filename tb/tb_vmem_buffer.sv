// Self-checking testbench of the banked membrane-potential buffer: every bank is
// written and read independently in the same cycles; reads return one cycle later.
module tb_vmem_buffer;
  import cerebron_pkg::*;
  localparam int NB = 8, D = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [NB-1:0] re = 0, we = 0;
  logic [NB-1:0][5:0] raddr = '0, waddr = '0;
  vmem_t [NB-1:0] rdata, wdata = '0;
  vmem_buffer #(.NB(NB), .DEPTH(D)) dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata);
  int checks = 0, failures = 0;
  vmem_t model [NB][D];
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        we[b] = 1; waddr[b] = 6'((i + b) % D); wdata[b] = vmem_t'($urandom);
        model[b][(i + b) % D] = wdata[b];
      end
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin re[b] = 1; raddr[b] = 6'((i * 3 + b) % D); end
      @(negedge clk); re = 0;
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (rdata[b] !== model[b][(i * 3 + b) % D]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
