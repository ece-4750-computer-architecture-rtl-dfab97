// cache_msgs_pkg: message formats and shared constants of the blocking caches.
//
// Four val/rdy channels connect a cache to its surroundings:
//   cachereq  : processor -> cache, one 32-bit word      (mem_req_4B_t, 77 bits)
//   cacheresp : cache -> processor, one 32-bit word      (mem_resp_4B_t, 47 bits)
//   memreq    : cache -> main memory, one 16-byte line   (mem_req_16B_t, 175 bits)
//   memresp   : main memory -> cache, one 16-byte line   (mem_resp_16B_t, 145 bits)
// Field order and bit positions follow the published message formats:
//   request  = {type[3], opaque[8], addr[32], len, data}
//   response = {type[3], opaque[8], test[2], len, data}
// with a 2-bit len for word messages and a 4-bit len for line messages
// (len 0 means "all bytes valid"). The numeric type encodings (read 0,
// write 1, init 2) are this design's choice. The 2-bit test field of a
// response reports a hit (1) or a miss (0) of the request.
package cache_msgs_pkg;

  typedef enum logic [2:0] {
    MEM_READ  = 3'd0,
    MEM_WRITE = 3'd1,
    MEM_INIT  = 3'd2
  } mem_type_e;

  typedef struct packed {
    mem_type_e   msg_type;  // [76:74]
    logic [7:0]  opaque;    // [73:66]
    logic [31:0] addr;      // [65:34]
    logic [1:0]  len;       // [33:32]
    logic [31:0] data;      // [31:0]
  } mem_req_4B_t;

  typedef struct packed {
    mem_type_e   msg_type;  // [46:44]
    logic [7:0]  opaque;    // [43:36]
    logic [1:0]  test;      // [35:34]
    logic [1:0]  len;       // [33:32]
    logic [31:0] data;      // [31:0]
  } mem_resp_4B_t;

  typedef struct packed {
    mem_type_e    msg_type; // [174:172]
    logic [7:0]   opaque;   // [171:164]
    logic [31:0]  addr;     // [163:132]
    logic [3:0]   len;      // [131:128]
    logic [127:0] data;     // [127:0]
  } mem_req_16B_t;

  typedef struct packed {
    mem_type_e    msg_type; // [144:142]
    logic [7:0]   opaque;   // [141:134]
    logic [1:0]   test;     // [133:132]
    logic [3:0]   len;      // [131:128]
    logic [127:0] data;     // [127:0]
  } mem_resp_16B_t;

  // Test-field values of a cache response.
  localparam logic [1:0] TEST_MISS = 2'd0;
  localparam logic [1:0] TEST_HIT  = 2'd1;

  // Cache geometry shared by both designs: 256 bytes of 16-byte lines.
  localparam int unsigned CACHE_BYTES = 256;
  localparam int unsigned LINE_BYTES  = 16;
  localparam int unsigned NUM_LINES   = CACHE_BYTES / LINE_BYTES;  // 16
  localparam int unsigned OFFSET_BITS = 4;                         // byte offset in a line

  // FSM states of the control units (short names as in line traces).
  typedef enum logic [3:0] {
    ST_I  = 4'd0,   // idle: accept a cache request
    ST_TC = 4'd1,   // tag check
    ST_IN = 4'd2,   // init data access
    ST_RD = 4'd3,   // read data access
    ST_WD = 4'd4,   // write data access
    ST_EP = 4'd5,   // evict prepare
    ST_ER = 4'd6,   // evict request
    ST_EW = 4'd7,   // evict wait
    ST_RR = 4'd8,   // refill request
    ST_RW = 4'd9,   // refill wait
    ST_RU = 4'd10,  // refill update
    ST_W  = 4'd11   // wait: send the cache response
  } cache_state_e;

  // Datapath multiplexer selects.
  typedef enum logic {
    MEMREQ_ADDR_REFILL = 1'b0,
    MEMREQ_ADDR_EVICT  = 1'b1
  } memreq_addr_sel_e;

  typedef enum logic {
    WDATA_WORD   = 1'b0,    // replicated request word (init, write)
    WDATA_REFILL = 1'b1     // whole refilled line
  } wdata_sel_e;

  // Control word from a control unit to its datapath.
  typedef struct packed {
    logic             cachereq_en;     // capture the accepted cache request
    logic             tag_wen;         // write the request tag into the tag array
    logic             data_wen;        // write the data array
    wdata_sel_e       wdata_sel;       // data-array write source
    logic             evict_en;        // capture victim address and line
    logic             refill_en;       // capture the refill line from memresp
    logic             read_data_en;    // capture the requested word
    memreq_addr_sel_e memreq_addr_sel; // memreq address: refill or victim
    mem_type_e        memreq_type;     // memreq type: read (refill) or write (evict)
    logic [1:0]       resp_test;       // test field of the cache response
    logic             way;             // selected way (set-associative design only)
  } cache_ctrl_t;

endpackage
