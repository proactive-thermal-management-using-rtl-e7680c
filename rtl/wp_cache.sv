// wp_cache: set-associative cache with way-based partitioning.
//
// Every request carries a partition class (inst/data, MBC multiply LUT, MBC add LUT). A lookup
// hits in any way of the set, but a miss may only allocate into the ways enabled for its class in
// way_mask; the number of ways so enabled is the class's partition factor. Within those ways the
// victim is an invalid way if one exists, else the least recently used one (LRU kept as a full
// age order per set). A class with no ways is served from the next level without allocation.
// Way-based partitioning of the L1 MBC cache and the shared L2 follows the published design;
// the replacement within a partition, the write policy and the timing are this design's choices.
//
// Writes are write-through and no-write-allocate: a write hit updates the line and both write
// hits and write misses are forwarded to the next level, which acknowledges with mem_resp_valid.
// Write data are whole lines. The LUT classes are only ever read.
//
// Timing: after reset the cache spends one cycle per set clearing its valid bits and LRU order,
// with req_ready low. Then it is blocking, one request at a time; req_ready is high only when idle. A read hit answers
// with resp_valid exactly HIT_LAT cycles after the request is accepted. A miss issues one line
// request on the mem_* port and answers in the cycle mem_resp_valid arrives, filling the victim
// way at the same clock edge. A write answers when the next level acknowledges it.
module wp_cache
  import pmbc_pkg::*;
#(
  parameter int SIZE_BYTES = 131072,   // 128 KB (the L2 of the evaluated system)
  parameter int WAYS       = 16,
  parameter int HIT_LAT    = 10        // 20 ns at 500 MHz
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // partition configuration: way_mask[c][w] = way w belongs to class c
  input  logic [NUM_CLS-1:0][WAYS-1:0] way_mask,
  // request side
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [ADDR_W-1:0]          req_addr,
  input  cls_e                       req_cls,
  input  logic                       req_we,
  input  logic [LINE_W-1:0]          req_wline,
  output logic                       resp_valid,
  output logic [LINE_W-1:0]          resp_line,
  output logic                       hit_pulse,    // a read was answered from this cache
  output logic                       miss_pulse,   // a read missed and went to the next level
  // next-level side
  output logic                       mem_req_valid,
  input  logic                       mem_req_ready,
  output logic [ADDR_W-1:0]          mem_req_addr,
  output logic                       mem_req_we,
  output logic [LINE_W-1:0]          mem_req_wline,
  input  logic                       mem_resp_valid,
  input  logic [LINE_W-1:0]          mem_resp_line
);

  localparam int SETS  = SIZE_BYTES / (LINE_BYTES * WAYS);
  localparam int SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int IDX_W = $clog2(SETS);
  localparam int TAG_W = ADDR_W - OFFS_W - IDX_W;
  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int CNT_W = (HIT_LAT > 1) ? $clog2(HIT_LAT) : 1;

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_LOOKUP, S_MEMREQ, S_MEMWAIT} state_e;
  typedef logic [WAYS-1:0][WAY_W-1:0] ages_t;

  // Per-set state is held in arrays with one write per cycle, so that they map to memories.
  logic [TAG_W-1:0]       tag_q   [SETS*WAYS];
  logic [LINE_W-1:0]      data_q  [SETS*WAYS];
  logic [WAYS-1:0]        valid_q [SETS];
  ages_t                  age_q   [SETS];         // 0 = most recently used

  state_e                 state_q;
  logic [SET_W-1:0]       init_q;                 // set being cleared after reset
  logic [ADDR_W-1:0]      addr_q;
  cls_e                   cls_q;
  logic                   we_q;
  logic [LINE_W-1:0]      wline_q;
  logic [CNT_W-1:0]       cnt_q;

  logic [SET_W-1:0]       set_idx;
  logic [TAG_W-1:0]       tag;
  logic                   hit;
  logic [WAY_W-1:0]       hit_way;
  logic                   have_victim;
  logic [WAY_W-1:0]       victim;
  logic [WAYS-1:0]        mask;
  logic [WAYS-1:0]        set_valid;
  ages_t                  set_age;
  ages_t                  init_age;

  always_comb begin
    set_idx   = SET_W'(addr_q[OFFS_W +: IDX_W]);
    tag       = addr_q[ADDR_W-1 -: TAG_W];
    mask      = way_mask[cls_q];
    set_valid = valid_q[set_idx];
    set_age   = age_q[set_idx];
    for (int w = 0; w < WAYS; w++) init_age[w] = WAY_W'(w);
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (set_valid[w] && tag_q[int'(set_idx) * WAYS + w] == tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
    // victim: first invalid way of the partition, else its oldest way
    have_victim = 1'b0;
    victim      = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (mask[w] && !set_valid[w] && !have_victim) begin
        have_victim = 1'b1;
        victim      = WAY_W'(w);
      end
    end
    if (!have_victim) begin
      for (int w = 0; w < WAYS; w++) begin
        if (mask[w] && (!have_victim || set_age[w] > set_age[victim])) begin
          have_victim = 1'b1;
          victim      = WAY_W'(w);
        end
      end
    end
  end

  logic lookup_done;
  assign lookup_done = (state_q == S_LOOKUP) && (cnt_q == '0);

  always_comb begin
    req_ready     = (state_q == S_IDLE);
    resp_valid    = 1'b0;
    resp_line     = mem_resp_line;
    hit_pulse     = 1'b0;
    miss_pulse    = 1'b0;
    if (lookup_done && !we_q && hit) begin
      resp_valid = 1'b1;
      resp_line  = data_q[int'(set_idx) * WAYS + int'(hit_way)];
      hit_pulse  = 1'b1;
    end
    if (lookup_done && !we_q && !hit) miss_pulse = 1'b1;
    if (state_q == S_MEMWAIT && mem_resp_valid) resp_valid = 1'b1;
    mem_req_valid = (state_q == S_MEMREQ);
    mem_req_addr  = we_q ? addr_q : {addr_q[ADDR_W-1:OFFS_W], {OFFS_W{1'b0}}};
    mem_req_we    = we_q;
    mem_req_wline = wline_q;
  end

  // LRU age update: the touched way becomes youngest, ways younger than it age by one.
  function automatic ages_t touched(input ages_t ag, input logic [WAY_W-1:0] tw);
    ages_t r;
    for (int w = 0; w < WAYS; w++) begin
      if (WAY_W'(w) == tw)      r[w] = '0;
      else if (ag[w] < ag[tw])  r[w] = ag[w] + 1'b1;
      else                      r[w] = ag[w];
    end
    return r;
  endfunction

  // control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_INIT;
      init_q  <= '0;
      addr_q  <= '0;
      cls_q   <= CLS_ID;
      we_q    <= 1'b0;
      wline_q <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_INIT: begin
          init_q <= init_q + 1'b1;
          if (init_q == SET_W'(SETS - 1)) state_q <= S_IDLE;
        end
        S_IDLE: begin
          if (req_valid) begin
            addr_q  <= req_addr;
            cls_q   <= req_cls;
            we_q    <= req_we;
            wline_q <= req_wline;
            cnt_q   <= CNT_W'(HIT_LAT - 1);
            state_q <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (cnt_q != '0)      cnt_q   <= cnt_q - 1'b1;
          else if (!we_q && hit) state_q <= S_IDLE;
          else                  state_q <= S_MEMREQ;
        end
        S_MEMREQ:  if (mem_req_ready)  state_q <= S_MEMWAIT;
        S_MEMWAIT: if (mem_resp_valid) state_q <= S_IDLE;
        default:   state_q <= S_IDLE;
      endcase
    end
  end

  // per-set state: cleared set by set after reset, then one update per access
  always_ff @(posedge clk) begin
    if (state_q == S_INIT) begin
      valid_q[init_q] <= '0;
      age_q[init_q]   <= init_age;
    end else if (lookup_done && hit) begin
      age_q[set_idx] <= touched(set_age, hit_way);
    end else if (state_q == S_MEMWAIT && mem_resp_valid && !we_q && have_victim) begin
      valid_q[set_idx] <= set_valid | (WAYS'(1) << victim);
      age_q[set_idx]   <= touched(set_age, victim);
    end
  end

  // tags and lines
  always_ff @(posedge clk) begin
    if (lookup_done && we_q && hit) begin
      data_q[int'(set_idx) * WAYS + int'(hit_way)] <= wline_q;
    end else if (state_q == S_MEMWAIT && mem_resp_valid && !we_q && have_victim) begin
      data_q[int'(set_idx) * WAYS + int'(victim)] <= mem_resp_line;
      tag_q[int'(set_idx) * WAYS + int'(victim)]  <= tag;
    end
  end

  // next-level answers only come for an outstanding request; requests are held until accepted
  assert property (@(posedge clk) disable iff (!rst_n) mem_resp_valid |-> state_q == S_MEMWAIT);
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr));

  if (SETS < 2 || SETS * WAYS * LINE_BYTES != SIZE_BYTES || (SETS & (SETS - 1)) != 0) begin : g_bad_size
    $error("wp_cache: SIZE_BYTES must be WAYS * LINE_BYTES * a power-of-two number of sets >= 2");
  end

endmodule
