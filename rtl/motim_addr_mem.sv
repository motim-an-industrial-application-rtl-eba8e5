// motim_addr_mem: the routing table of a MOTIM network interface.
//
// What it does: it maps a 48-bit Ethernet MAC address to the local port
// (router address and port number) behind which that address was last seen.
// It starts empty and is filled by learning: every packet that arrives from
// the NoC teaches it the packet's source address.
//
// How it works: P entries are organised as P/WAYS sets of WAYS entries. A
// hash (XOR fold of the 48 address bits down to the set index) picks the set,
// so no sequential search is needed; the WAYS entries of the set are compared
// in parallel. Each entry holds the MAC address, the port number, the router
// address and an access counter. A lookup that hits increments the counter
// (saturating). A learn of an address not in the set fills an empty entry
// if there is one, otherwise replaces the entry with the smallest counter
// among those whose counter is not 0; entries with counter 0 were inserted
// recently and are protected, and if all entries of the set are protected the
// address is not stored. A new entry starts with counter 0.
//
// Interface: lookup request lk_req/lk_mac, answered one cycle later by
// lk_done with lk_hit and lk_lp (= 2*router + port). Learn request
// ln_req/ln_mac/ln_lp, acknowledged by ln_done one cycle later. Requests are
// levels held until done; a lookup wins over a learn in the same cycle.
//
// The entry fields, p = 256, hashing and the replacement rule follow the
// document. The set-associative organisation, the hash function, WAYS = 4 and
// the 8-bit counter are this design's choices.
module motim_addr_mem #(
  parameter int P       = 256,
  parameter int WAYS    = 4,
  parameter int LP_W    = 5,
  parameter int CNT_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lk_req,
  input  logic [47:0]      lk_mac,
  output logic             lk_done,
  output logic             lk_hit,
  output logic [LP_W-1:0]  lk_lp,
  input  logic             ln_req,
  input  logic [47:0]      ln_mac,
  input  logic [LP_W-1:0]  ln_lp,
  output logic             ln_done
);

  localparam int SETS = P / WAYS;
  localparam int IW   = (SETS > 1) ? $clog2(SETS) : 1;

  typedef struct packed {
    logic              valid;
    logic [47:0]       mac;
    logic              port;
    logic [LP_W-2:0]   router;
    logic [CNT_W-1:0]  count;
  } entry_t;

  entry_t tbl [SETS][WAYS];

  function automatic logic [IW-1:0] hash(input logic [47:0] mac);
    logic [IW-1:0] h;
    h = '0;
    for (int b = 0; b < 48; b++) h[b % IW] ^= mac[b];
    return h;
  endfunction

  logic           do_lk, do_ln;
  logic [47:0]    mac;
  logic [IW-1:0]  set;
  logic           hit;
  int             hit_way;
  logic           vic_ok;
  int             vic_way;

  always_comb begin
    do_lk = lk_req && !lk_done;
    do_ln = ln_req && !ln_done && !do_lk;
    mac   = do_lk ? lk_mac : ln_mac;
    set   = hash(mac);
    hit     = 1'b0;
    hit_way = 0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (tbl[set][w].valid && tbl[set][w].mac == mac) begin
        hit     = 1'b1;
        hit_way = w;
      end
    // victim: an empty entry, else the smallest non-zero counter
    vic_ok  = 1'b0;
    vic_way = 0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (!tbl[set][w].valid) begin
        vic_ok  = 1'b1;
        vic_way = w;
      end
    if (!vic_ok) begin
      for (int w = 0; w < WAYS; w++)
        if (tbl[set][w].count != '0 &&
            (!vic_ok || tbl[set][w].count < tbl[set][vic_way].count)) begin
          vic_ok  = 1'b1;
          vic_way = w;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_done <= 1'b0;
      lk_hit  <= 1'b0;
      lk_lp   <= '0;
      ln_done <= 1'b0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) tbl[s][w] <= '0;
    end else begin
      lk_done <= 1'b0;
      ln_done <= 1'b0;
      if (do_lk) begin
        lk_done <= 1'b1;
        lk_hit  <= hit;
        lk_lp   <= {tbl[set][hit_way].router, tbl[set][hit_way].port};
        if (hit && tbl[set][hit_way].count != '1)
          tbl[set][hit_way].count <= tbl[set][hit_way].count + 1'b1;
      end else if (do_ln) begin
        ln_done <= 1'b1;
        if (!hit && vic_ok)
          tbl[set][vic_way] <= '{valid: 1'b1, mac: ln_mac, port: ln_lp[0],
                                 router: ln_lp[LP_W-1:1], count: '0};
      end
    end
  end

endmodule
