// Self-checking testbench of the weight buffer: random weight vectors are written
// through the host port and read back on the controller port one cycle later.
module tb_weight_buffer;
  import cerebron_pkg::*;
  localparam int D = 512;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we = 0;
  logic [8:0] a_addr = 0, b_addr = 0;
  wvec_t a_wdata = '0, b_rdata;
  weight_buffer #(.DEPTH(D)) dut (.clk, .a_we, .a_addr, .a_wdata, .b_addr, .b_rdata);
  int checks = 0, failures = 0;
  wvec_t model [D];
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk); a_we = 1; a_addr = 9'(i); a_wdata = {$urandom, $urandom}; model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); b_addr = 9'((i * 7) % D);
      @(negedge clk);
      checks++;
      if (b_rdata !== model[(i * 7) % D]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
