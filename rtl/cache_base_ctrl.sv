// cache_base_ctrl: FSM control unit of the direct-mapped blocking cache.
//
// One transaction at a time walks through these states (short names):
//   I  idle          cachereq_rdy; an accepted request is loaded -> TC
//   TC tag check     init -> IN; read hit -> RD; write hit -> WD;
//                    miss on a dirty line -> EP; other miss -> RR
//   IN init access   write the word, write tag, valid=1, dirty=0 -> W
//   RD read access   capture the requested word -> W
//   WD write access  write the word, dirty=1 -> W
//   EP evict prep    capture victim address and line -> ER
//   ER evict req     memreq write of the victim line, until memreq_rdy -> EW
//   EW evict wait    wait for the write's memresp -> RR
//   RR refill req    memreq read of the missing line, until memreq_rdy -> RW
//   RW refill wait   wait for memresp, capture the line -> RU
//   RU refill update write line and tag, valid=1, dirty=0 -> RD or WD
//   W  wait          cacheresp_val until cacheresp_rdy -> I
// The states and transitions are the published FSM; a hit therefore takes
// four cycles (I, TC, RD/WD, W), a clean miss seven and a dirty miss ten with
// a memory that answers in the cycle after the request. The valid and dirty
// bits are flip-flops here, reset to zero (this design's choice of place and
// reset). The response's test field is 1 for a read or write that hit in TC
// and 0 for a miss and for every init. Only the dirty bit of a valid line
// triggers an eviction.
module cache_base_ctrl
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
  input  logic [3:0]   req_idx,
  input  logic         tag_match,

  output cache_state_e state
);

  cache_state_e state_next;

  logic [NUM_LINES-1:0] valid_bits;
  logic [NUM_LINES-1:0] dirty_bits;
  logic                 hit_reg;

  logic hit, line_dirty;
  assign hit        = valid_bits[req_idx] && tag_match;
  assign line_dirty = valid_bits[req_idx] && dirty_bits[req_idx];

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
        else if (line_dirty)       state_next = ST_EP;
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
    ctrl.way             = 1'b0;
  end

  // Valid, dirty and hit bookkeeping
  always_ff @(posedge clk) begin
    if (reset) begin
      valid_bits <= '0;
      dirty_bits <= '0;
      hit_reg    <= 1'b0;
    end else begin
      if (state == ST_TC) hit_reg <= (req_type != MEM_INIT) && hit;
      if (state == ST_IN || state == ST_RU) begin
        valid_bits[req_idx] <= 1'b1;
        dirty_bits[req_idx] <= 1'b0;
      end
      if (state == ST_WD) dirty_bits[req_idx] <= 1'b1;
    end
  end

  // val/rdy rules: a request is only accepted when idle, and the FSM never
  // offers a memory request and a cache response at once.
  assert property (@(posedge clk) disable iff (reset) !(memreq_val && cacheresp_val));
  assert property (@(posedge clk) disable iff (reset) cachereq_rdy |-> !memreq_val);

endmodule
