// defect_packer: keeps the defective blocks and passes them on towards DMA.
//
// The raw pixels of every block are written into one of NSLOT block slots
// (NSLOT x BLK*BLK/TAPS words of block RAM) while the DSP core works out the
// verdict for the same block. When the verdict arrives (a few clocks after
// the block's last word), a clean block's slot is freed at once and a
// defective block's slot joins the send queue. Queued slots are sent in
// order as packets on a valid/ready stream: BLK*BLK/TAPS beats of TAPS
// pixels, first and last marked, with the block's descriptor (band, column,
// rules fired, features) held on out_desc for the whole packet. A slot is
// freed as soon as its last word has been read, and the next packet follows
// without an idle clock, so an unbroken run of defective blocks is passed on
// at the input rate when out_ready stays high. Three slots are needed for
// that: one being filled, one being sent, and one whose verdict is pending
// while the next block has already started.
//
// If a block starts while no slot is free (the DMA side has stalled for
// longer than the slots can absorb) the block is dropped and counted in
// blocks_dropped; its verdict is then ignored. Verdicts are matched to slots
// through a small in-order queue, one entry per finished block.
//
// Sending only the defective raw blocks to the host follows the document;
// the slots, the stream and the descriptor are this design's choices.
module defect_packer
  import sqa_pkg::*;
#(
  parameter int unsigned TAPS  = 2,
  parameter int unsigned BLK   = 32,
  parameter int unsigned NSLOT = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  // raw block stream
  input  logic            in_valid,
  input  pix_t [TAPS-1:0] in_pix,
  input  btag_t           in_tag,
  // verdicts, in block order
  input  logic            v_valid,
  input  logic            v_defect,
  input  logic [3:0]      v_rules,
  input  features_t       v_feat,
  input  btag_t           v_tag,
  // packets towards DMA
  output logic            out_valid,
  input  logic            out_ready,
  output pix_t [TAPS-1:0] out_pix,
  output logic            out_first,
  output logic            out_last,
  output desc_t           out_desc,
  // status
  output logic [31:0]     blocks_sent,
  output logic [31:0]     blocks_clean,
  output logic [31:0]     blocks_dropped,
  output logic [31:0]     stall_cycles
);

  localparam int unsigned WPK = BLK * BLK / TAPS;   // words per block
  localparam int unsigned IW  = $clog2(WPK);
  localparam int unsigned SW  = (NSLOT > 1) ? $clog2(NSLOT) : 1;
  localparam int unsigned QD  = 4;                  // verdict queue depth
  localparam int unsigned QW  = $clog2(QD + 1);
  localparam int unsigned SQW = $clog2(NSLOT + 1);

  typedef logic [SW-1:0] slot_t;
  typedef enum logic [1:0] {S_FREE, S_FILL, S_WAIT, S_QUEUED} slot_st_t;

  typedef struct packed {
    logic  dropped;
    slot_t slot;
  } pend_t;

  slot_st_t st   [NSLOT];
  desc_t    desc [NSLOT];

  // ---------------- fill side ----------------
  logic          filling;     // current block has a slot
  slot_t         fslot;
  logic [IW-1:0] widx;
  logic          alloc_ok;
  slot_t         alloc_slot;

  always_comb begin
    alloc_ok   = 1'b0;
    alloc_slot = '0;
    for (int s = NSLOT - 1; s >= 0; s--)
      if (st[s] == S_FREE) begin
        alloc_ok   = 1'b1;
        alloc_slot = slot_t'(s);
      end
  end

  logic  blk_kept;            // the word on the input belongs to a kept block
  slot_t blk_slot;
  assign blk_kept = in_tag.first ? alloc_ok : filling;
  assign blk_slot = in_tag.first ? alloc_slot : fslot;

  logic                ram_we;
  logic [SW+IW-1:0]    ram_waddr;
  assign ram_we    = in_valid && blk_kept;
  assign ram_waddr = {blk_slot, in_tag.first ? IW'(0) : widx};

  // ---------------- verdict queue ----------------
  pend_t       pq [QD];
  logic [QW-1:0] pq_n;

  // ---------------- send queue (slots in verdict order) ----------------
  slot_t          sq [NSLOT];
  logic [SQW-1:0] sq_n;

  // ---------------- sender ----------------
  logic          sending;     // a slot is being read
  slot_t         sslot;
  logic [IW-1:0] ridx;        // next word to read
  logic          adv;         // a word is read into the output register
  logic          rd_done;     // the last word of the slot is read now

  assign adv     = sending && (!out_valid || out_ready);
  assign rd_done = adv && (ridx == IW'(WPK - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSLOT; s++) begin
        st[s]   <= S_FREE;
        desc[s] <= '0;
        sq[s]   <= '0;
      end
      for (int k = 0; k < QD; k++) pq[k] <= '0;
      filling        <= 1'b0;
      fslot          <= '0;
      widx           <= '0;
      pq_n           <= '0;
      sq_n           <= '0;
      sending        <= 1'b0;
      sslot          <= '0;
      ridx           <= '0;
      out_valid      <= 1'b0;
      out_first      <= 1'b0;
      out_last       <= 1'b0;
      out_desc       <= '0;
      blocks_sent    <= '0;
      blocks_clean   <= '0;
      blocks_dropped <= '0;
      stall_cycles   <= '0;
    end else begin
      // ---- fill ----
      if (in_valid) begin
        if (in_tag.first) begin
          filling <= alloc_ok;
          fslot   <= alloc_slot;
          widx    <= IW'(1);
          if (alloc_ok) st[alloc_slot] <= S_FILL;
          else          blocks_dropped <= blocks_dropped + 32'd1;
        end else begin
          widx <= widx + IW'(1);
        end
        if (in_tag.last) begin
          filling <= 1'b0;
          if (blk_kept) st[blk_slot] <= S_WAIT;
        end
      end

      // ---- verdict queue: push at block end, pop at verdict ----
      begin
        logic [QW-1:0] n;
        n = pq_n;
        if (v_valid && n != '0) begin
          for (int k = 0; k < QD - 1; k++) pq[k] <= pq[k + 1];
          n = n - QW'(1);
        end
        if (in_valid && in_tag.last) begin
          pq[n[$clog2(QD)-1:0]] <= '{dropped: !blk_kept, slot: blk_slot};
          n = n + QW'(1);
        end
        pq_n <= n;
      end

      // ---- verdicts and the send queue ----
      begin
        logic [SQW-1:0] n;
        slot_t          q [NSLOT];
        for (int s = 0; s < NSLOT; s++) q[s] = sq[s];
        n = sq_n;
        if (rd_done) begin
          // the head slot is fully read: free it and pop it
          st[sslot] <= S_FREE;
          for (int s = 0; s < NSLOT - 1; s++) q[s] = q[s + 1];
          n = n - SQW'(1);
        end
        if (v_valid && pq_n != '0 && !pq[0].dropped) begin
          if (v_defect) begin
            st[pq[0].slot]   <= S_QUEUED;
            desc[pq[0].slot] <= '{band: v_tag.band, col: v_tag.col, rules: v_rules, feat: v_feat};
            q[n[SW-1:0]] = pq[0].slot;
            n = n + SQW'(1);
          end else begin
            st[pq[0].slot] <= S_FREE;
            blocks_clean   <= blocks_clean + 32'd1;
          end
        end
        for (int s = 0; s < NSLOT; s++) sq[s] <= q[s];
        sq_n <= n;
      end

      // ---- sender ----
      if (!sending || rd_done) begin
        // take the head of the queue (the next one if the head finishes now)
        if (!sending && sq_n != '0) begin
          sending <= 1'b1;
          sslot   <= sq[0];
          ridx    <= '0;
        end else if (rd_done && sq_n > SQW'(1)) begin
          sslot <= sq[1];
          ridx  <= '0;
        end else if (rd_done) begin
          sending <= 1'b0;
        end
      end
      if (adv) begin
        if (!rd_done) ridx <= ridx + IW'(1);
        out_valid <= 1'b1;
        out_first <= (ridx == '0);
        out_last  <= (ridx == IW'(WPK - 1));
        if (ridx == '0) out_desc <= desc[sslot];
      end else if (out_valid && out_ready) begin
        out_valid <= 1'b0;
      end
      if (out_valid && out_ready && out_last) blocks_sent <= blocks_sent + 32'd1;
      if (out_valid && !out_ready) stall_cycles <= stall_cycles + 32'd1;
    end
  end

  sdp_ram #(.WIDTH(TAPS * 8), .DEPTH(NSLOT * WPK)) u_slots (
    .clk   (clk),
    .we    (ram_we),
    .waddr (ram_waddr),
    .wdata (in_pix),
    .re    (adv),
    .raddr ({sslot, ridx}),
    .rdata (out_pix)
  );

  // every verdict belongs to a finished block
  property p_verdict_has_block;
    @(posedge clk) disable iff (!rst_n) v_valid |-> (pq_n != '0);
  endproperty
  assert property (p_verdict_has_block);

  // a beat must not change while the DMA side stalls
  property p_stable_under_stall;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_pix) && $stable(out_last) && $stable(out_desc));
  endproperty
  assert property (p_stable_under_stall);

endmodule
