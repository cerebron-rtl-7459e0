// Neuron state buffer: binary spikes, VEC channels per word.
//
// Word a holds channels 8g..8g+7 of one pixel: a = base + (y*W + x)*CG + g.
// Port A is the host / DMA side (word write, word read), port B feeds the data
// collection unit (word read). Output spikes are written bit by bit through NWP
// write ports, one per PE, so every firing of the array can be stored in the cycle it
// happens; bit address = word*VEC + channel bit. Reads have one cycle of latency.
// The buffer is named by the design description; its organisation is this
// implementation's own.
module ns_buffer
  import cerebron_pkg::*;
#(
  parameter int unsigned DEPTH = NS_DEPTH,
  parameter int unsigned NWP   = NPE,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BAW  = $clog2(DEPTH*VEC)
) (
  input  logic                     clk,
  input  logic                     a_we,
  input  logic [AW-1:0]            a_addr,
  input  logic [VEC-1:0]           a_wdata,
  output logic [VEC-1:0]           a_rdata,
  input  logic [AW-1:0]            b_addr,
  output logic [VEC-1:0]           b_rdata,
  input  logic [NWP-1:0]           s_we,
  input  logic [NWP-1:0][BAW-1:0]  s_addr,
  input  logic [NWP-1:0]           s_bit
);
  logic [VEC-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    for (int p = 0; p < NWP; p++)
      if (s_we[p]) mem[s_addr[p][BAW-1:$clog2(VEC)]][s_addr[p][$clog2(VEC)-1:0]] <= s_bit[p];
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end
endmodule
