// Workload scheduling unit: online channel-wise workload balancing.
//
// Workload accumulator: while a layer runs, every cycle each CU column reports how
// many of its neurons spiked and for which output channel; the counts per channel are
// the workloads of the 2-D convolutions of the next layer, whose inputs these spikes
// are. The spike count of a channel goes up by one per spike.
//
// On `start` the counts of the F channels are scheduled in three steps:
//  1. Sorting and regrouping. The channels are cut into R = F/M rounds of M. Each
//     round is sorted by serial full comparison: one element per cycle is compared
//     with all M elements of its round at once (M comparators) to find its rank, so a
//     round takes M cycles. The element of rank q of round j is written to list q at
//     position j: list q collects the q-th smallest of every round.
//  2. Fine tuning, T passes. For q = 0..M-2 the largest element of list q is compared
//     with the largest of list q+1 and the two swap places if the first is larger. A
//     list maximum is found by a serial scan of R cycles.
//  3. Adjusting. The lists are stored back to back in the scheduling table, so cutting
//     the table into groups of Q = M channels splits or joins the lists as needed.
// Until a schedule exists, or when F is not a multiple of M, the table is the
// identity. `tab_ch[c]` returns the table entry `tab_idx[c]` combinationally.
// The three steps and the comparison sort follow the design description. The
// description gives "Max(L_i) >= Max(L_i+1)" in its algorithm listing and "if it is
// larger" in its text; the strict comparison is used here, which avoids swapping equal
// maxima. Counter widths and the cycle-by-cycle sequencing are this design's own.
module workload_sched
  import cerebron_pkg::*;
#(
  parameter int unsigned FM  = FMAX,  // channels tracked
  parameter int unsigned CW  = 16,    // spike count width
  parameter int unsigned NIN = M,     // accumulate ports
  localparam int unsigned FAW = $clog2(FM)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic [NIN-1:0]             acc_en,
  input  logic [NIN-1:0][FAW-1:0]    acc_ch,
  input  logic [NIN-1:0][5:0]        acc_n,
  input  logic                       start,
  input  logic [FAW:0]               f,
  input  logic [3:0]                 iters,
  output logic                       busy,
  output logic                       done,
  input  logic [M-1:0][FAW-1:0]      tab_idx,
  output logic [M-1:0][FAW-1:0]      tab_ch,
  output logic [CW-1:0]              cnt_rd,
  input  logic [FAW-1:0]             cnt_rd_idx
);
  localparam int unsigned MW = $clog2(M);

  logic [CW-1:0]  cnt [FM];
  logic [FAW-1:0] tab [FM];

  typedef enum logic [2:0] {S_IDLE, S_SORT, S_SCAN, S_CMP, S_DONE} state_e;
  state_e state;

  logic [FAW:0]   rounds;      // R = F / M
  logic [FAW:0]   j;           // round being sorted / scan position
  logic [MW-1:0]  e;           // element being ranked
  logic [MW:0]    li;          // list being scanned
  logic [3:0]     it;
  logic [CW-1:0]  mv_a, mv_s;  // max of list li-1 (carried), running max of scan
  logic [FAW-1:0] mp_a, mp_s;
  logic           have_a;

  // rank of element e inside round j (M parallel comparators)
  logic [MW:0]    rank;
  logic [FAW-1:0] base;
  always_comb begin
    base = FAW'(j * M);
    rank = '0;
    for (int kk = 0; kk < M; kk++) begin
      logic [CW-1:0] sk, se;
      sk = cnt[base + FAW'(kk)];
      se = cnt[base + FAW'(e)];
      if (sk < se || (sk == se && kk < int'(e))) rank++;
    end
  end

  logic [FAW-1:0] scan_pos;
  logic [CW-1:0]  scan_v;
  assign scan_pos = FAW'(li * rounds + j);
  assign scan_v   = cnt[tab[scan_pos]];

  always_comb
    for (int c = 0; c < M; c++) tab_ch[c] = tab[tab_idx[c]];
  assign cnt_rd = cnt[cnt_rd_idx];

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      rounds <= '0; j <= '0; e <= '0; li <= '0; it <= '0;
      mv_a <= '0; mp_a <= '0; mv_s <= '0; mp_s <= '0; have_a <= 1'b0;
      for (int i = 0; i < FM; i++) begin
        cnt[i] <= '0;
        tab[i] <= FAW'(i);
      end
    end else begin
      // workload accumulator
      if (clear) begin
        for (int i = 0; i < FM; i++) cnt[i] <= '0;
      end else begin
        for (int p = 0; p < NIN; p++)
          if (acc_en[p]) cnt[acc_ch[p]] <= cnt[acc_ch[p]] + CW'(acc_n[p]);
      end

      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          rounds <= (FAW+1)'(int'(f) / M);
          j <= '0; e <= '0; li <= '0; it <= '0; have_a <= 1'b0;
          if (int'(f) < M || (int'(f) % M) != 0) begin
            for (int i = 0; i < FM; i++) tab[i] <= FAW'(i);
            state <= S_DONE;
          end else begin
            state <= S_SORT;
          end
        end
        S_SORT: begin
          tab[FAW'(rank * rounds + j)] <= base + FAW'(e);
          e <= e + 1'b1;
          if (e == MW'(M-1)) begin
            j <= j + 1'b1;
            if (j + 1'b1 == rounds) begin
              j <= '0;
              state <= (iters == 0) ? S_DONE : S_SCAN;
            end
          end
        end
        S_SCAN: begin
          // running maximum of list li
          if (j == 0 || scan_v > mv_s) begin
            mv_s <= scan_v;
            mp_s <= scan_pos;
          end
          if (j + 1'b1 == rounds) begin
            j <= '0;
            state <= S_CMP;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_CMP: begin
          if (!have_a) begin
            mv_a <= mv_s; mp_a <= mp_s; have_a <= 1'b1;
          end else if (mv_a > mv_s) begin
            tab[mp_a] <= tab[mp_s];
            tab[mp_s] <= tab[mp_a];
            mp_a <= mp_s;            // the larger element now sits in list li
          end else begin
            mv_a <= mv_s; mp_a <= mp_s;
          end
          if (li == (MW+1)'(M-1)) begin
            li <= '0; have_a <= 1'b0;
            it <= it + 1'b1;
            state <= (it + 1'b1 == iters) ? S_DONE : S_SCAN;
          end else begin
            li <= li + 1'b1;
            state <= S_SCAN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
