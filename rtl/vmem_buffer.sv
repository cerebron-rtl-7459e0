// Membrane potential (VMEM) buffer, banked one bank per PE.
//
// Each of the NB banks is a simple dual-port memory: one read port, registered with
// one cycle of latency, and one write port. Bank (r, c, l) serves PE l of the CU in
// row r, column c, so all PEs can read and write their potentials in the same cycle
// without conflict. The address generator gives each output neuron a unique word in
// the bank of the PE that fires it. Banking per PE is a choice of this
// implementation; the design description names the buffer only.
module vmem_buffer
  import cerebron_pkg::*;
#(
  parameter int unsigned NB    = NPE,
  parameter int unsigned DEPTH = V_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic [NB-1:0]         re,
  input  logic [NB-1:0][AW-1:0] raddr,
  output vmem_t [NB-1:0]        rdata,
  input  logic [NB-1:0]         we,
  input  logic [NB-1:0][AW-1:0] waddr,
  input  vmem_t [NB-1:0]        wdata
);
  for (genvar b = 0; b < NB; b++) begin : g_bank
    vmem_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we[b]) mem[waddr[b]] <= wdata[b];
      if (re[b]) rdata[b] <= mem[raddr[b]];
    end
  end
endmodule
