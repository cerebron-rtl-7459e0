// Reconfigurable processing element (PE).
//
// A PE is built from three parts. Data selecting: when an item is loaded, the neuron
// state index vector and the weight vector mask each other, so only "aligned pairs"
// (spike = 1 and weight != 0) are kept in a mask register; in pooling mode the index
// alone forms the mask. Integrating: one aligned pair is accumulated per clock (the
// weight in convolution modes, +1 in pooling mode), so an item costs max(1, popcount)
// cycles and zero operands cost nothing beyond the one load cycle. Output forwarding:
// in cascade mode the PEs of a CU form a chain; a PE that has finished its own share
// (En_local) waits for the partial sum of the previous PE, adds it and forwards the
// total when the next PE is ready to take it (En_next), which is the handshake
// psum_out_valid / psum_out_ready. The tail PE of a chain, and every PE in the
// stand-alone and pooling modes, fires an integrate-and-fire neuron:
//   Vtemp = V + sum,  spike = (Vtemp >= Vth),  V' = spike ? Vtemp - Vth : Vtemp.
//
// Interface and timing: `ready` high means `load` is taken this cycle. An item with
// `first` set starts a new neuron; the membrane potential read it triggers outside
// returns on `vmem_rdata` one cycle after the load. `out_valid` pulses for one cycle
// with the spike and the new potential (write it back to out_meta.vaddr).
// Mode set, masking, accumulation, psum chaining and reset-by-subtraction follow the
// design description; the one-pair-per-cycle accumulator, the handshake names, the
// saturation of V to VW bits and pooling as spike counting (fire when the count
// reaches Vth, Vth = window size) are choices of this implementation.
// Lint may report rst_n as used both synchronously and asynchronously: the registers
// reset synchronously, and the only other use is the `disable iff` of the handshake
// assertion at the end, which is not logic.
module pe
  import cerebron_pkg::*;
#(
  parameter bit IS_HEAD = 1'b1,   // first PE of a cascade chain
  parameter bit IS_TAIL = 1'b1,   // last PE of a cascade chain (fires)
  parameter int unsigned AW = 24  // accumulator width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pe_mode_e        mode,
  input  vmem_t           vth,
  input  logic            first_step,
  // item
  output logic            ready,
  input  logic            load,
  input  logic [VEC-1:0]  idx,
  input  wvec_t           w,
  input  logic            first,
  input  logic            last,
  input  meta_t           meta_in,
  input  vmem_t           vmem_rdata,
  // cascade chain
  input  logic [AW-1:0]   psum_in,
  input  logic            psum_in_valid,
  output logic            psum_in_ready,
  output logic [AW-1:0]   psum_out,
  output logic            psum_out_valid,
  input  logic            psum_out_ready,
  // firing
  output logic            out_valid,
  output logic            out_spike,
  output vmem_t           out_vmem,
  output meta_t           out_meta,
  output logic            busy
);

  typedef enum logic [2:0] {S_IDLE, S_ACC, S_WAITP, S_SEND, S_FIRE} state_e;
  state_e state, state_nx;

  logic [VEC-1:0]       mask_q, mask_d;
  wvec_t                w_q;
  logic signed [AW-1:0] acc_q, acc_d;
  logic                 last_q;
  meta_t                meta_q;
  vmem_t                vmem_q;
  logic                 vmem_pend;

  // lowest set bit of the aligned-pair mask
  logic [$clog2(VEC)-1:0] sel;
  always_comb begin
    sel = '0;
    for (int i = VEC-1; i >= 0; i--) if (mask_q[i]) sel = i[$clog2(VEC)-1:0];
  end
  logic one_left;
  assign one_left = (mask_q & (mask_q - 1'b1)) == '0;

  logic signed [AW-1:0] contrib;
  assign contrib = (mode == PE_POOL) ? AW'(1) : AW'(signed'(w_q[sel]));

  // data selecting: mutual masking of index and weights
  logic [VEC-1:0] nzw, mask_new;
  always_comb begin
    for (int i = 0; i < VEC; i++) nzw[i] = (w[i] != '0);
    mask_new = (mode == PE_POOL) ? idx : (idx & nzw);
  end

  assign ready = (state == S_IDLE) || (state == S_ACC && one_left && !last_q);

  // state after the local share of a neuron is complete
  function automatic state_e done_state(pe_mode_e md);
    if (md != PE_CASCADE) return S_FIRE;
    if (!IS_HEAD)         return S_WAITP;
    if (IS_TAIL)          return S_FIRE;
    return S_SEND;
  endfunction

  always_comb begin
    state_nx = state;
    mask_d   = mask_q;
    acc_d    = acc_q;
    unique case (state)
      S_IDLE: ;
      S_ACC: begin
        acc_d  = acc_q + contrib;
        mask_d = mask_q & ~(VEC'(1) << sel);
        if (mask_d == '0) state_nx = last_q ? done_state(mode) : S_IDLE;
      end
      S_WAITP: if (psum_in_valid) begin
        acc_d    = acc_q + signed'(psum_in);
        state_nx = IS_TAIL ? S_FIRE : S_SEND;
      end
      S_SEND:  if (psum_out_ready) begin
        state_nx = S_IDLE;
        acc_d    = '0;
      end
      S_FIRE: begin
        state_nx = S_IDLE;
        acc_d    = '0;
      end
      default: state_nx = S_IDLE;
    endcase
    if (load && ready) begin
      if (first) acc_d = '0;
      mask_d   = mask_new;
      if (mask_new != '0) state_nx = S_ACC;
      else                state_nx = last ? done_state(mode) : S_IDLE;
    end
  end

  // firing
  vmem_t                vsrc;
  logic signed [AW:0]   vtemp_w, vsub_w;
  vmem_t                vtemp, vsub;
  localparam logic signed [AW:0] VMAX = (AW+1)'(2**(VW-1) - 1);
  localparam logic signed [AW:0] VMIN = -(AW+1)'(2**(VW-1));
  function automatic vmem_t sat(logic signed [AW:0] v);
    if (v > VMAX) return vmem_t'(VMAX);
    if (v < VMIN) return vmem_t'(VMIN);
    return vmem_t'(v);
  endfunction
  always_comb begin
    vsrc    = vmem_pend ? (first_step ? vmem_t'(0) : vmem_rdata) : vmem_q;
    vtemp_w = (AW+1)'(signed'(vsrc)) + (AW+1)'(acc_q);
    vtemp   = sat(vtemp_w);
    vsub_w  = (AW+1)'(signed'(vtemp)) - (AW+1)'(signed'(vth));
    vsub    = sat(vsub_w);
  end

  assign out_valid      = (state == S_FIRE);
  assign out_spike      = (state == S_FIRE) && (vtemp >= vth);
  assign out_vmem       = (vtemp >= vth) ? vsub : vtemp;
  assign out_meta       = meta_q;
  assign psum_in_ready  = (state == S_WAITP);
  assign psum_out_valid = (state == S_SEND);
  assign psum_out       = acc_q;
  assign busy           = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mask_q    <= '0;
      w_q       <= '0;
      acc_q     <= '0;
      last_q    <= 1'b0;
      meta_q    <= '0;
      vmem_q    <= '0;
      vmem_pend <= 1'b0;
    end else begin
      state     <= state_nx;
      mask_q    <= mask_d;
      acc_q     <= acc_d;
      vmem_pend <= load && ready && first;
      if (vmem_pend) vmem_q <= first_step ? vmem_t'(0) : vmem_rdata;
      if (load && ready) begin
        w_q    <= w;
        last_q <= last;
        if (first) meta_q <= meta_in;
      end
    end
  end

  // a partial sum is only offered while the PE holds one
  assert property (@(posedge clk) disable iff (!rst_n) psum_out_valid |-> busy);

endmodule
