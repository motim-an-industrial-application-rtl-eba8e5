// motim_ni: the network interface between a Packet/Cell module and the NoC.
//
// What it does:
//  * stores cells coming from the PC in a cell buffer of NCELLS cells;
//  * for the first cell of a packet, looks the destination MAC address up in
//    its address memory (motim_addr_mem) to find the target local port; an
//    unknown address is broadcast, i.e. every cell of the packet is sent to
//    each port set in BCAST_MASK except this one;
//  * for every cell and target, sends a connection request into the NoC,
//    waits for ack, then sends the 128-byte cell as one burst; after a nack
//    it waits RETRY cycles and asks again;
//  * forwards cells arriving from the NoC to the PC unchanged, with their
//    session number, and learns the source MAC address and origin port of
//    every first cell into the address memory.
//
// Cell buffer overflow: the PC writes cells at its own pace. If a new cell
// starts while every slot is full, the cell is refused, pc_error is raised
// for 2 cycles (pc_credit is low meanwhile) and the PC drops the rest of its
// packet. If the refused cell was not the first of its packet, the error flag
// (bit 5 of byte 126) is set in the newest stored cell, which belongs to the
// same packet, so the receiving PC drops the part it has already received.
//
// Interface: PC side pc_rx/pc_data/pc_offset in (pc_offset marks byte 127 of
// a cell), pc_credit/pc_error out; cell_tx/cell_data/cell_eop/cell_session to
// the PC; pc_release in, passed on to the NoC as noc_release. NoC side:
// noc_in (requests and cells), noc_credit, noc_resp (ack/nack), noc_out and
// noc_session (delivered cells). ev_* outputs pulse for one cycle on events.
//
// Timing: the request for a stored cell leaves 1 cycle after the cell is
// complete (3 cycles for a first cell, which is looked up first); the burst
// starts the cycle after ack. Cells to the PC are delayed by 1 cycle.
//
// From the document: cell buffer, error to the PC and error flag in the last
// stored cell, lookup, broadcast of unknown addresses, learning, ack/nack and
// the 200-cycle retry. This design's choices: NCELLS = 16 cells (one block RAM), the request
// format, the 2-cycle error pulse, and broadcast done here as one unicast
// circuit per target port.
module motim_ni import motim_pkg::*; #(
  parameter int LP_W   = 5,
  parameter int NLP    = 32,
  parameter logic [LP_W-1:0] MY_LP = '0,
  parameter logic [NLP-1:0] BCAST_MASK = '1,
  parameter int NSESS  = 4,
  parameter int P      = 256,
  parameter int NCELLS = 16,
  parameter int RETRY  = RETRY_CYCLES,
  localparam int SW    = (NSESS > 1) ? $clog2(NSESS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the PC
  input  logic              pc_rx,
  input  logic [7:0]        pc_data,
  input  logic              pc_offset,
  output logic              pc_credit,
  output logic              pc_error,
  // to the PC
  output logic              cell_tx,
  output logic [7:0]        cell_data,
  output logic              cell_eop,
  output logic [SW-1:0]     cell_session,
  input  logic [NSESS-1:0]  pc_release,
  // NoC
  output flit_t             noc_in,
  input  logic              noc_credit,
  input  resp_t             noc_resp,
  input  flit_t             noc_out,
  input  logic [SW-1:0]     noc_session,
  output logic [NSESS-1:0]  noc_release,
  // events
  output logic              ev_nack,
  output logic              ev_bcast,
  output logic              ev_hit,
  output logic              ev_overflow
);

  localparam int CSW = (NCELLS > 1) ? $clog2(NCELLS) : 1;
  localparam int RW  = $clog2(RETRY + 1);

  assign noc_release = pc_release;

  // ---------------- address memory ----------------
  logic            lk_req, lk_done, lk_hit;
  logic [LP_W-1:0] lk_lp;
  logic            ln_req, ln_done;
  logic [47:0]     ln_mac;
  logic [LP_W-1:0] ln_lp;
  logic [47:0]     lk_mac;

  motim_addr_mem #(.P(P), .LP_W(LP_W)) u_amem (
    .clk, .rst_n,
    .lk_req, .lk_mac, .lk_done, .lk_hit, .lk_lp,
    .ln_req, .ln_mac, .ln_lp, .ln_done
  );

  // ---------------- cell buffer ----------------
  logic [7:0]      cbuf [NCELLS * CELL_BYTES];
  logic [NCELLS-1:0] full;
  logic            slot_first [NCELLS];
  logic [47:0]     slot_dmac  [NCELLS];
  logic [CSW-1:0]  wslot, rslot, prev_slot;
  logic [6:0]      wcnt;
  logic [1:0]      drop;
  logic            overflow;
  logic            set_err;

  assign pc_credit = (drop == '0);
  assign pc_error  = (drop != '0);
  assign overflow  = pc_rx && pc_credit && (wcnt == '0) && full[wslot];
  assign prev_slot = (wslot == '0) ? CSW'(NCELLS - 1) : wslot - 1'b1;
  assign set_err   = overflow && !pc_data[7];

  // ---------------- sender ----------------
  typedef enum logic [2:0] {
    S_IDLE, S_WAITLK, S_HDR0, S_HDR1, S_WAITACK, S_BACKOFF, S_SEND
  } sstate_e;
  sstate_e         sst;
  logic            bcast;
  logic [LP_W-1:0] tgt;
  logic [6:0]      scnt;
  logic [RW-1:0]   bcnt;
  logic            free_slot;

  // next broadcast target above cur (nxt_ok = 0 when none is left)
  function automatic logic [LP_W:0] next_tgt(input int cur);
    for (int c = 0; c < NLP; c++)
      if (c > cur && BCAST_MASK[c] && c != int'(MY_LP)) return {1'b1, LP_W'(c)};
    return '0;
  endfunction

  logic [LP_W:0] nxt_first, nxt_after;
  assign nxt_first = next_tgt(-1);
  assign nxt_after = next_tgt(int'(tgt));

  always_ff @(posedge clk) begin
    if (pc_rx && pc_credit && !overflow)
      cbuf[int'(wslot) * CELL_BYTES + int'(wcnt)] <= pc_data;
    if (set_err)
      cbuf[int'(prev_slot) * CELL_BYTES + CELL_TYPE_POS] <=
        cbuf[int'(prev_slot) * CELL_BYTES + CELL_TYPE_POS] | 8'h20;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wslot <= '0; rslot <= '0; wcnt <= '0; drop <= '0;
      for (int s = 0; s < NCELLS; s++) begin
        slot_first[s] <= 1'b0; slot_dmac[s] <= '0;
      end
      sst <= S_IDLE; bcast <= 1'b0; tgt <= '0; scnt <= '0; bcnt <= '0;
      lk_req <= 1'b0; lk_mac <= '0;
      noc_in <= '0;
      ev_nack <= 1'b0; ev_bcast <= 1'b0; ev_hit <= 1'b0; ev_overflow <= 1'b0;
    end else begin
      ev_nack <= 1'b0; ev_bcast <= 1'b0; ev_hit <= 1'b0; ev_overflow <= 1'b0;

      // ---- write side ----
      if (drop != '0) drop <= drop - 1'b1;
      if (overflow) begin
        drop        <= 2'd2;
        ev_overflow <= 1'b1;
      end else if (pc_rx && pc_credit) begin
        if (wcnt == '0) slot_first[wslot] <= pc_data[7];
        if (int'(wcnt) >= CELL_HDR && int'(wcnt) < CELL_HDR + 6)
          slot_dmac[wslot] <= {slot_dmac[wslot][39:0], pc_data};
        if (pc_offset) begin
          wcnt <= '0;
          full[wslot] <= 1'b1;
          wslot <= (int'(wslot) == NCELLS - 1) ? '0 : wslot + 1'b1;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end

      // ---- send side ----
      noc_in <= '0;
      unique case (sst)
        S_IDLE: if (full[rslot]) begin
          if (slot_first[rslot]) begin
            lk_req <= 1'b1;
            lk_mac <= slot_dmac[rslot];
            sst    <= S_WAITLK;
          end else begin
            sst <= S_HDR0;
          end
        end
        S_WAITLK: if (lk_done) begin
          lk_req <= 1'b0;
          if (lk_hit) begin
            bcast  <= 1'b0;
            tgt    <= lk_lp;
            ev_hit <= 1'b1;
            sst    <= S_HDR0;
          end else begin
            bcast    <= 1'b1;
            ev_bcast <= 1'b1;
            tgt      <= nxt_first[LP_W-1:0];
            sst      <= nxt_first[LP_W] ? S_HDR0 : S_IDLE;  // no target: drop
          end
        end
        S_HDR0: if (noc_credit) begin
          noc_in <= '{valid: 1'b1, eop: 1'b0, data: 8'({slot_first[rslot], 7'(tgt)})};
          sst    <= S_HDR1;
        end
        S_HDR1: begin
          noc_in <= '{valid: 1'b1, eop: 1'b0, data: 8'(MY_LP)};
          sst    <= S_WAITACK;
        end
        S_WAITACK: begin
          if (noc_resp.ack) begin
            scnt <= '0;
            sst  <= S_SEND;
          end else if (noc_resp.nack) begin
            ev_nack <= 1'b1;
            bcnt    <= RW'(RETRY - 1);
            sst     <= S_BACKOFF;
          end
        end
        S_BACKOFF: begin
          if (bcnt == '0) sst <= S_HDR0;
          else            bcnt <= bcnt - 1'b1;
        end
        S_SEND: begin
          noc_in <= '{valid: 1'b1, eop: (scnt == 7'd127),
                      data: cbuf[int'(rslot) * CELL_BYTES + int'(scnt)]};
          scnt   <= scnt + 1'b1;
          if (scnt == 7'd127) begin
            if (bcast && nxt_after[LP_W]) begin
              tgt <= nxt_after[LP_W-1:0];
              sst <= S_HDR0;
            end else begin
              sst <= S_IDLE;
            end
          end
        end
        default: sst <= S_IDLE;
      endcase
      if (free_slot) begin
        full[rslot] <= 1'b0;
        rslot <= (int'(rslot) == NCELLS - 1) ? '0 : rslot + 1'b1;
      end
    end
  end

  // the slot is released after its last burst (or when a broadcast has no target)
  assign free_slot = ((sst == S_SEND) && (scnt == 7'd127) && !(bcast && nxt_after[LP_W])) ||
                     ((sst == S_WAITLK) && lk_done && !lk_hit && !nxt_first[LP_W]);

  // ---------------- receive side: forward and learn ----------------
  logic [6:0]      rcnt;
  logic            rfirst;
  logic [47:0]     smac;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_tx <= 1'b0; cell_data <= '0; cell_eop <= 1'b0; cell_session <= '0;
      rcnt <= '0; rfirst <= 1'b0; smac <= '0;
      ln_req <= 1'b0; ln_mac <= '0; ln_lp <= '0;
    end else begin
      cell_tx      <= noc_out.valid;
      cell_data    <= noc_out.data;
      cell_eop     <= noc_out.valid && noc_out.eop;
      cell_session <= noc_session;
      if (ln_done) ln_req <= 1'b0;
      if (noc_out.valid) begin
        rcnt <= noc_out.eop ? '0 : rcnt + 1'b1;
        if (rcnt == 7'd0) rfirst <= noc_out.data[7];
        if (rcnt == 7'd1) ln_lp  <= noc_out.data[LP_W-1:0];
        if (int'(rcnt) >= CELL_HDR + 6 && int'(rcnt) < CELL_HDR + 12)
          smac <= {smac[39:0], noc_out.data};
        if (int'(rcnt) == CELL_HDR + 12 && rfirst) begin
          ln_req <= 1'b1;
          ln_mac <= smac;
        end
      end
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    (pc_rx && pc_credit && wcnt != '0) |-> !full[wslot])
    else $error("ni: cell buffer slot overwritten");

endmodule
