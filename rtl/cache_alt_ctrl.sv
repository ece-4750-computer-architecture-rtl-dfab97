// cache_alt_ctrl: FSM control unit of the two-way set-associative cache.
//
// Same states and transitions as the direct-mapped control unit (I, TC, IN,
// RD, WD, EP, ER, EW, RR, RW, RU, W; see cache_base_ctrl), with a way chosen
// in tag check and held in way_reg for the rest of the transaction:
//   * hit: valid[w][idx] AND tag_match[w]; the hitting way is used;
//   * miss or init without a hit: the victim is an invalid way if the set has
//     one (way 0 first), otherwise the set's least-recently-used way;
//   * eviction happens when the victim way is valid and dirty.
// Valid and dirty bits are kept per way, and one LRU bit per set names the
// way to replace next; it is updated in the data-access states (IN, RD, WD)
// to point at the way not used. Splitting valid bits per way, ANDing them
// with the tag matches and keeping LRU bits in the control unit follow the
// published description; preferring an invalid way, the update point and the
// reset values (all bits zero) are this design's choices. Latencies are those
// of the direct-mapped cache: 4 cycles on a hit, 7 on a clean miss, 10 on a
// dirty miss with a memory answering the cycle after the request.
module cache_alt_ctrl
  import cache_msgs_pkg::*;
(
  input  logic         clk,
  input  logic         reset,

  input  logic         cachereq_val,
  output logic         cachereq_rdy,
  output logic         cacheresp_val,
  input  logic         cacheresp_rdy,
  output logic         memreq_val,
  input  logic         memreq_rdy,
  input  logic         memresp_val,
  output logic         memresp_rdy,

  output cache_ctrl_t  ctrl,
  input  mem_type_e    req_type,
  input  logic [2:0]   req_idx,
  input  logic [1:0]   tag_match,

  output cache_state_e state
);

  localparam int unsigned NUM_SETS = NUM_LINES / 2;  // 8

  cache_state_e state_next;

  logic [NUM_SETS-1:0] valid_bits [2];
  logic [NUM_SETS-1:0] dirty_bits [2];
  logic [NUM_SETS-1:0] lru_bits;      // way to replace next, per set
  logic                hit_reg;
  logic                way_reg;

  // Tag check
  logic [1:0] way_hit;
  logic       hit, hit_way, victim_way, tc_way, victim_dirty;
  assign way_hit[0] = valid_bits[0][req_idx] && tag_match[0];
  assign way_hit[1] = valid_bits[1][req_idx] && tag_match[1];
  assign hit        = |way_hit;
  assign hit_way    = way_hit[1];

  always_comb begin
    if (!valid_bits[0][req_idx])      victim_way = 1'b0;
    else if (!valid_bits[1][req_idx]) victim_way = 1'b1;
    else                              victim_way = lru_bits[req_idx];
  end

  assign tc_way       = hit ? hit_way : victim_way;
  assign victim_dirty = valid_bits[victim_way][req_idx] && dirty_bits[victim_way][req_idx];

  // State register
  always_ff @(posedge clk) begin
    if (reset) state <= ST_I;
    else       state <= state_next;
  end

  // Next-state logic
  always_comb begin
    state_next = state;
    unique case (state)
      ST_I:  if (cachereq_val) state_next = ST_TC;
      ST_TC: begin
        if (req_type == MEM_INIT)  state_next = ST_IN;
        else if (hit)              state_next = (req_type == MEM_READ) ? ST_RD : ST_WD;
        else if (victim_dirty)     state_next = ST_EP;
        else                       state_next = ST_RR;
      end
      ST_IN: state_next = ST_W;
      ST_RD: state_next = ST_W;
      ST_WD: state_next = ST_W;
      ST_EP: state_next = ST_ER;
      ST_ER: if (memreq_rdy)  state_next = ST_EW;
      ST_EW: if (memresp_val) state_next = ST_RR;
      ST_RR: if (memreq_rdy)  state_next = ST_RW;
      ST_RW: if (memresp_val) state_next = ST_RU;
      ST_RU: state_next = (req_type == MEM_READ) ? ST_RD : ST_WD;
      ST_W:  if (cacheresp_rdy) state_next = ST_I;
      default: state_next = ST_I;
    endcase
  end

  // Outputs
  always_comb begin
    cachereq_rdy  = (state == ST_I);
    cacheresp_val = (state == ST_W);
    memreq_val    = (state == ST_ER) || (state == ST_RR);
    memresp_rdy   = (state == ST_EW) || (state == ST_RW);

    ctrl                 = '0;
    ctrl.cachereq_en     = (state == ST_I) && cachereq_val;
    ctrl.tag_wen         = (state == ST_IN) || (state == ST_RU);
    ctrl.data_wen        = (state == ST_IN) || (state == ST_WD) || (state == ST_RU);
    ctrl.wdata_sel       = (state == ST_RU) ? WDATA_REFILL : WDATA_WORD;
    ctrl.evict_en        = (state == ST_EP);
    ctrl.refill_en       = (state == ST_RW) && memresp_val;
    ctrl.read_data_en    = (state == ST_RD);
    ctrl.memreq_addr_sel = (state == ST_ER) ? MEMREQ_ADDR_EVICT : MEMREQ_ADDR_REFILL;
    ctrl.memreq_type     = (state == ST_ER) ? MEM_WRITE : MEM_READ;
    ctrl.resp_test       = hit_reg ? TEST_HIT : TEST_MISS;
    ctrl.way             = way_reg;
  end

  // Valid, dirty, LRU, hit and way bookkeeping
  always_ff @(posedge clk) begin
    if (reset) begin
      valid_bits[0] <= '0;
      valid_bits[1] <= '0;
      dirty_bits[0] <= '0;
      dirty_bits[1] <= '0;
      lru_bits      <= '0;
      hit_reg       <= 1'b0;
      way_reg       <= 1'b0;
    end else begin
      if (state == ST_TC) begin
        hit_reg <= (req_type != MEM_INIT) && hit;
        way_reg <= tc_way;
      end
      if (state == ST_IN || state == ST_RU) begin
        valid_bits[way_reg][req_idx] <= 1'b1;
        dirty_bits[way_reg][req_idx] <= 1'b0;
      end
      if (state == ST_WD) dirty_bits[way_reg][req_idx] <= 1'b1;
      if (state == ST_IN || state == ST_RD || state == ST_WD)
        lru_bits[req_idx] <= ~way_reg;
    end
  end

  assert property (@(posedge clk) disable iff (reset) !(memreq_val && cacheresp_val));
  assert property (@(posedge clk) disable iff (reset) cachereq_rdy |-> !memreq_val);
  // At most one way can hold a given tag.
  assert property (@(posedge clk) disable iff (reset) (state == ST_TC) |-> !(&way_hit));

endmodule
