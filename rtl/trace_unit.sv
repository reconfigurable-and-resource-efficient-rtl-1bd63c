// Trace unit: MAX-HOLD / MIN-HOLD / CLR-WR / AVG over the magnitudes of all channels,
// into one of two DATA_STORE RAMs while the host reads the other.
//
// A sweep address runs over the bins 0..N-1 continuously, one bin per clock. For each bin
// it reads CHAN-0..N_CH-1 data (the channels' output RAMs, each word with its per-bin
// write toggle), the active store and a small RAM of the toggles last seen per channel,
// and one clock later writes the updated store word and seen toggles back. A channel
// value is new ("fresh") when its toggle differs from the one last seen, so every frame
// is folded in exactly once whatever the frame rate.
// Folding, per trace mode (count = frames folded, 0 = empty bin):
//   MAX    value = max(value, fresh values)       MIN  value = min(value, fresh values)
//   CLR_WR value = the fresh value of the highest-numbered fresh channel
//   AVG    value = value + fresh values, until count reaches avg_num; the host divides
//          by avg_num.
// host_req asks for the stores to be switched. The switch happens at the next sweep start:
// the store written so far becomes readable (host_ready goes high; host_raddr ->
// host_rdata one clock later) and the other store is cleared during its first sweep
// (its old words are taken as empty). The first sweep after reset only records the
// channel toggles and clears the active store. Configuration is static between resets.
// Trace functions, the division left to the host and the switched double store follow
// the document; the sweep, the toggle bits, the count field and the CLR_WR
// tie-break are this design's choices.
module trace_unit
  import fft_pkg::*;
#(
  parameter int N_CH  = NCH,
  parameter int LOG2N = LOG2N_MAX
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       log2n,
  input  logic [2:0]       nch,
  input  trace_e           mode,
  input  logic [CNT_W-1:0] avg_num,
  // channel output RAM read port (shared address, one clock latency)
  output logic [LOG2N-1:0] ch_raddr,
  input  mag_word_t        ch_rword [N_CH],
  // host side
  input  logic             host_req,
  output logic             host_ready,
  input  logic [LOG2N-1:0] host_raddr,
  output store_t           host_rdata,
  output logic             sweep_wrap
);
  logic [LOG2N-1:0] k, k_q, mask;
  logic             active;                  // store being written: 0 or 1
  logic             act_q, clr, clr_q, sync, sync_q, pend;

  assign mask     = LOG2N'((1 << log2n) - 1);
  assign ch_raddr = k;
  assign sweep_wrap = (k == mask);

  always_ff @(posedge clk) begin
    if (rst) begin
      k          <= '0;
      active     <= 1'b0;
      clr        <= 1'b1;
      sync       <= 1'b1;
      pend       <= 1'b0;
      host_ready <= 1'b0;
    end else begin
      k <= (k + 1'b1) & mask;
      if (host_req) begin
        pend       <= 1'b1;
        host_ready <= 1'b0;
      end
      if (k == mask) begin                   // next clock starts a new sweep
        sync <= 1'b0;
        clr  <= 1'b0;
        if (pend || host_req) begin
          active     <= !active;
          clr        <= 1'b1;
          pend       <= 1'b0;
          host_ready <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    k_q    <= k;
    act_q  <= active;
    clr_q  <= clr;
    sync_q <= sync;
  end

  // ---------------- stores and seen-toggle RAM ----------------
  store_t          st_rdata [2];
  store_t          st_wdata;
  logic [N_CH-1:0] seen_q, seen_w;
  logic            host_bank_q;

  for (genvar b = 0; b < 2; b++) begin : g_store
    sdp_ram #(.WIDTH($bits(store_t)), .DEPTH(1 << LOG2N)) u_store (
      .clk  (clk),
      .we   (act_q == 1'(b)),
      .waddr(k_q),
      .wdata(st_wdata),
      .re   (1'b1),
      .raddr((active == 1'(b)) ? k : host_raddr),
      .rdata(st_rdata[b])
    );
  end

  always_ff @(posedge clk) host_bank_q <= !active;
  assign host_rdata = st_rdata[host_bank_q];

  sdp_ram #(.WIDTH(N_CH), .DEPTH(1 << LOG2N)) u_seen (
    .clk  (clk),
    .we   (1'b1),
    .waddr(k_q),
    .wdata(seen_w),
    .re   (1'b1),
    .raddr(k),
    .rdata(seen_q)
  );

  // ---------------- folding ----------------
  store_t cur;
  logic   is_new;
  always_comb begin
    cur = st_rdata[act_q];
    if (clr_q) cur = '0;
    for (int c = 0; c < N_CH; c++) begin
      seen_w[c] = ch_rword[c].par;
      is_new    = !sync_q && (3'(c) < nch) && (ch_rword[c].par != seen_q[c]);
      if (is_new) begin
        unique case (mode)
          TR_MAX:
            if (cur.cnt == '0 || STORE_W'(ch_rword[c].mag) > cur.val) cur.val = STORE_W'(ch_rword[c].mag);
          TR_MIN:
            if (cur.cnt == '0 || STORE_W'(ch_rword[c].mag) < cur.val) cur.val = STORE_W'(ch_rword[c].mag);
          TR_CLRWR:
            cur.val = STORE_W'(ch_rword[c].mag);
          default:
            if (cur.cnt < avg_num) cur.val = cur.val + STORE_W'(ch_rword[c].mag);
        endcase
        if (mode == TR_AVG) begin
          if (cur.cnt < avg_num) cur.cnt = cur.cnt + 1'b1;
        end else if (cur.cnt != '1) begin
          cur.cnt = cur.cnt + 1'b1;
        end
      end
    end
    st_wdata = cur;
  end
endmodule
