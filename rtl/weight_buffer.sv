// Synaptic weight buffer.
//
// One word holds VEC signed weights. The host writes it through port A; the
// controller reads it through port B (one cycle of latency) to fill the weight
// register files of the CU array. Standard and pointwise layers store filter f,
// kernel tap t, channel group g at wbase + (f*K*K + t)*CG + g; depthwise layers store
// kernel row ky of channel ch at wbase + ch*K + ky (weights of the row in lanes
// 0..K-1). The layout is this implementation's own.
module weight_buffer
  import cerebron_pkg::*;
#(
  parameter int unsigned DEPTH = W_DEPTH,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  wvec_t         a_wdata,
  input  logic [AW-1:0] b_addr,
  output wvec_t         b_rdata
);
  wvec_t mem [DEPTH];
  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
    b_rdata <= mem[b_addr];
  end
endmodule
