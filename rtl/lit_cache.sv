// lit_cache: 128 kB, 4-way set-associative, true-LRU on-chip cache that is
// backed by NAND Flash through software, with a pinned region and per-bank
// power gating.
//
// Organisation. 512 sets of four 64-byte lines. Each way owns four of the
// sixteen 2048x32 data banks (bank = {way, set[8:7]}), so a data bank is one
// 8 kB slice of one way and is the unit of power gating. Each way has a
// 512x5 tag bank; one 512x6 bank holds the true-LRU word of every set. Line
// valid bits are flip-flops so that powering a data bank down can invalidate
// its 128 lines in one clock.
//
// Misses are handled by software. A load or store that misses completes with
// `fault` set and changes nothing: the bus turns that into an error response,
// the core takes a precise fault, and the handler reads the line from NAND
// Flash. The handler then asks for a line with `alloc_req`/`alloc_addr`: the
// cache picks a victim (an invalid way first, otherwise the least recently
// used way that is not pinned, falling back to the second, third and fourth
// oldest), installs the new tag, marks the line valid and most recently used,
// and reports the line it displaced (`evict_valid`, `evict_addr`). Nothing is
// ever written back by hardware: software decides from the eviction report
// whether the old line must be saved. The handler fills the new line with
// ordinary stores, which now hit.
//
// Pinning. A line whose address lies below `pin_line` (byte address, compared
// at line granularity) is never chosen as a victim; the miss handler and the
// flash translation layer live there. A miss below `pin_line` also raises
// `fault_pinned`. If all four lines of a set are pinned, the allocation
// fails (`alloc_ok` = 0).
//
// Power. `bank_pwr[b]` powers data bank b; `tag_pwr` powers the tag and LRU
// banks. Lines in an unpowered bank are invalid from then on.
//
// Timing. Accept a one-cycle `req` (or `alloc_req`) while `idle`; the banks
// are read in that cycle and `done` (or `alloc_done`) follows in the next
// cycle, with read data, a write already taking effect. `req` wins if both
// arrive together. Byte address width is tag + set + line offset = 20 bits.
//
// The capacity, associativity, bank shapes and widths, pinning, software fill
// and explicit write-back follow the published design; the allocation command,
// the eviction report and the 2-cycle timing are this design's own.
module lit_cache
  import lit_pkg::*;
#(
  parameter int unsigned TAG_W  = CACHE_TAG_W,
  parameter int unsigned SETS   = CACHE_SETS,
  parameter int unsigned LINE_W = CACHE_LINE_WDS,
  localparam int unsigned IDX_W  = $clog2(SETS),
  localparam int unsigned WRD_W  = $clog2(LINE_W),
  localparam int unsigned ADDR_W = TAG_W + IDX_W + WRD_W + 2,
  localparam int unsigned BANK_DEPTH = SETS / 4 * LINE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // load / store port
  output logic              idle,
  input  logic              req,
  input  logic              we,
  input  logic [3:0]        be,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic              done,
  output logic              fault,
  output logic              fault_pinned,
  output logic [31:0]       rdata,
  // line allocation by the miss handler
  input  logic              alloc_req,
  input  logic [ADDR_W-1:0] alloc_addr,
  output logic              alloc_done,
  output logic              alloc_ok,
  output logic [1:0]        alloc_way,
  output logic              evict_valid,
  output logic [ADDR_W-1:0] evict_addr,
  // configuration
  input  logic [ADDR_W-1:0] pin_line,
  // power gating
  input  logic [15:0]       bank_pwr,
  input  logic              tag_pwr
);

  localparam int unsigned BA_W = $clog2(BANK_DEPTH);
  localparam int unsigned LA_W = TAG_W + IDX_W;      // line address width

  typedef enum logic [1:0] {C_IDLE, C_LOOK, C_ALLOC} cstate_e;
  cstate_e st;

  // latched request
  logic              l_we;
  logic [3:0]        l_be;
  logic [ADDR_W-1:0] l_addr;
  logic [31:0]       l_wdata;

  logic [SETS-1:0] valid [4];

  // address fields
  logic [ADDR_W-1:0] a_in;
  logic [IDX_W-1:0]  in_idx, l_idx;
  logic [TAG_W-1:0]  l_tag;
  logic [WRD_W-1:0]  in_wrd, l_wrd;
  logic              start_acc, start_alc;

  assign start_acc = (st == C_IDLE) && req;
  assign start_alc = (st == C_IDLE) && alloc_req && !req;
  assign a_in      = req ? addr : alloc_addr;
  assign in_idx    = a_in[WRD_W+2 +: IDX_W];
  assign in_wrd    = a_in[2 +: WRD_W];
  assign l_idx     = l_addr[WRD_W+2 +: IDX_W];
  assign l_tag     = l_addr[WRD_W+2+IDX_W +: TAG_W];
  assign l_wrd     = l_addr[2 +: WRD_W];
  assign idle      = (st == C_IDLE);

  // ---------------- tag and LRU banks ----------------
  logic [TAG_W-1:0] tag_rd [4];
  logic             tag_we [4];
  logic [5:0]       lru_rd, lru_wd;
  logic             lru_we;
  logic [1:0]       sel_way;    // way written in the second cycle

  for (genvar w = 0; w < 4; w++) begin : g_tag
    sram_sp #(.DEPTH(SETS), .WIDTH(TAG_W)) u_tag (
      .clk, .pwr(tag_pwr),
      .en   (start_acc || start_alc || tag_we[w]),
      .we   (tag_we[w]),
      .addr (tag_we[w] ? l_idx : in_idx),
      .wdata(l_tag),
      .wmask({TAG_W{1'b1}}),
      .rdata(tag_rd[w])
    );
  end

  sram_sp #(.DEPTH(SETS), .WIDTH(6)) u_lru (
    .clk, .pwr(tag_pwr),
    .en   (start_acc || start_alc || lru_we),
    .we   (lru_we),
    .addr (lru_we ? l_idx : in_idx),
    .wdata(lru_wd),
    .wmask(6'h3f),
    .rdata(lru_rd)
  );

  // ---------------- data banks ----------------
  logic [31:0] bank_rd [16];
  logic        data_we;
  logic [31:0] wmask;
  for (genvar i = 0; i < 4; i++) begin : g_wmask assign wmask[8*i +: 8] = {8{l_be[i]}}; end

  for (genvar b = 0; b < 16; b++) begin : g_data
    logic my_rd, my_wr;
    assign my_rd = start_acc && (in_idx[IDX_W-1 -: 2] == 2'(b % 4));
    assign my_wr = data_we && (sel_way == 2'(b / 4)) && (l_idx[IDX_W-1 -: 2] == 2'(b % 4));
    sram_sp #(.DEPTH(BANK_DEPTH), .WIDTH(32)) u_data (
      .clk, .pwr(bank_pwr[b]),
      .en   (my_rd || my_wr),
      .we   (my_wr),
      .addr (my_wr ? BA_W'({l_idx[IDX_W-3:0], l_wrd}) : BA_W'({in_idx[IDX_W-3:0], in_wrd})),
      .wdata(l_wdata),
      .wmask(wmask),
      .rdata(bank_rd[b])
    );
  end

  // ---------------- compare ----------------
  logic [3:0] hit_w, vld_w, pin_w;
  logic       hit;
  logic [1:0] hit_way;
  always_comb begin
    hit_way = '0;
    for (int unsigned w = 0; w < 4; w++) begin
      vld_w[w] = valid[w][l_idx];
      hit_w[w] = vld_w[w] && (tag_rd[w] == l_tag);
      pin_w[w] = LA_W'({tag_rd[w], l_idx}) < pin_line[ADDR_W-1 -: LA_W];
      if (hit_w[w]) hit_way = w[1:0];
    end
    hit = |hit_w;
  end

  // victim choice
  logic [5:0] lru_next;
  logic [1:0] lru_victim, victim;
  logic       lru_ok, victim_ok, have_inv;
  logic [1:0] inv_way, age_unused [4];
  true_lru u_lru_logic (
    .state     (lru_rd),
    .touch_way (sel_way),
    .excl      (vld_w & pin_w),
    .next_state(lru_next),
    .victim    (lru_victim),
    .victim_ok (lru_ok),
    .age       (age_unused)
  );

  always_comb begin
    have_inv = 1'b0;
    inv_way  = '0;
    for (int w = 3; w >= 0; w--)
      if (!vld_w[w]) begin
        have_inv = 1'b1;
        inv_way  = w[1:0];
      end
    victim    = hit ? hit_way : (have_inv ? inv_way : lru_victim);
    victim_ok = hit || have_inv || lru_ok;
  end

  // ---------------- second-cycle actions ----------------
  always_comb begin
    sel_way  = (st == C_ALLOC) ? victim : hit_way;
    data_we  = (st == C_LOOK) && hit && l_we;
    lru_we   = ((st == C_LOOK) && hit) || ((st == C_ALLOC) && victim_ok);
    lru_wd   = lru_next;
    for (int unsigned w = 0; w < 4; w++)
      tag_we[w] = (st == C_ALLOC) && victim_ok && !hit && (victim == w[1:0]);
  end

  assign done         = (st == C_LOOK);
  assign fault        = (st == C_LOOK) && !hit;
  assign fault_pinned = fault && (LA_W'(l_addr[ADDR_W-1 -: LA_W]) < pin_line[ADDR_W-1 -: LA_W]);
  assign rdata        = bank_rd[{hit_way, l_idx[IDX_W-1 -: 2]}];

  assign alloc_done   = (st == C_ALLOC);
  assign alloc_ok     = victim_ok;
  assign alloc_way    = victim;
  assign evict_valid  = (st == C_ALLOC) && victim_ok && !hit && vld_w[victim];
  assign evict_addr   = {tag_rd[victim], l_idx, {(WRD_W+2){1'b0}}};

  // ---------------- state, request latch ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= C_IDLE;
      l_we    <= 1'b0;
      l_be    <= '0;
      l_addr  <= '0;
      l_wdata <= '0;
    end else begin
      unique case (st)
        C_IDLE: begin
          if (start_acc) begin
            st      <= C_LOOK;
            l_we    <= we;
            l_be    <= be;
            l_addr  <= addr;
            l_wdata <= wdata;
          end else if (start_alc) begin
            st     <= C_ALLOC;
            l_we   <= 1'b0;
            l_addr <= alloc_addr;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  // ---------------- valid bits ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < 4; w++) valid[w] <= '0;
    end else begin
      if (st == C_ALLOC && victim_ok && !hit) valid[victim][l_idx] <= 1'b1;
      for (int w = 0; w < 4; w++)
        for (int s = 0; s < 4; s++)
          if (!tag_pwr || !bank_pwr[w*4+s]) valid[w][s*(SETS/4) +: SETS/4] <= '0;
    end
  end

`ifndef SYNTHESIS
  // one request at a time
  assert property (@(posedge clk) disable iff (!rst_n) !(req && st != C_IDLE))
    else $error("lit_cache: req while busy");
  assert property (@(posedge clk) disable iff (!rst_n) !(alloc_req && st != C_IDLE))
    else $error("lit_cache: alloc_req while busy");
`endif

endmodule
