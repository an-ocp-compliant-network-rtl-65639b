// Shared types and constants of the MANGO OCP network adapter.
//
// OCP side: 32-bit address and data, as in the evaluated adapters. MThreadID
// (2 bits), MBurstLength (4 bits) and MConnID (3 bits) widths are choices of
// this design. Network side: 32-bit flits with an end-of-packet sideband bit.
// A "chunk" is the unit handed between the clocked and the clockless halves
// of an adapter: up to four flits that cross the clock boundary with a single
// handshake, so a short packet is synchronized in one go.
//
// Packet format (this design's choice; the adapter maps OCP signals to it in
// the encap/decap blocks only):
//   BE header flit : routing path (only on the BE port, port 0)
//   control flit   : {type[31:30], thread[29:28], burst length[27:24],
//                     SResp[23:22], interrupt[21], interrupt level[20],
//                     0[19:16], return path[15:0]}
//   address flit   : MAddr (requests only)
//   data flits     : one per burst word (write requests, read responses)
package mango_na_pkg;

  localparam int unsigned DATA_W      = 32;
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned FLIT_W      = 32;
  localparam int unsigned THREAD_W    = 2;
  localparam int unsigned BURST_W     = 4;
  localparam int unsigned CONN_W      = 3;
  localparam int unsigned PORT_W      = 2;   // up to 4 network ports: BE + 3 GS
  localparam int unsigned PATH_W      = 16;
  localparam int unsigned LUT_IDX_W   = 8;   // 8 MSBs of MAddr index the route table
  localparam int unsigned CHUNK_FLITS = 4;
  localparam int unsigned NFLITS_W    = 3;

  // MConnID values with a special meaning
  localparam logic [CONN_W-1:0] CONN_LUT_CFG = 3'd4;  // write local route table
  localparam logic [CONN_W-1:0] CONN_NA_CFG  = 3'd5;  // configure a target NA over BE

  typedef enum logic [2:0] {
    OCP_IDLE = 3'b000,
    OCP_WR   = 3'b001,
    OCP_RD   = 3'b010
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    SRESP_NULL = 2'b00,
    SRESP_DVA  = 2'b01,
    SRESP_FAIL = 2'b10,
    SRESP_ERR  = 2'b11
  } ocp_resp_e;

  // Signals driven by an OCP master
  typedef struct packed {
    ocp_cmd_e              MCmd;
    logic [ADDR_W-1:0]     MAddr;
    logic [BURST_W-1:0]    MBurstLength;
    logic [THREAD_W-1:0]   MThreadID;
    logic [CONN_W-1:0]     MConnID;
    logic                  MDataValid;
    logic [DATA_W-1:0]     MData;
    logic                  MDataLast;
    logic                  MRespAccept;
  } ocp_m2s_t;

  // Signals driven by an OCP slave
  typedef struct packed {
    logic                  SCmdAccept;
    logic                  SDataAccept;
    ocp_resp_e             SResp;
    logic [DATA_W-1:0]     SData;
    logic [THREAD_W-1:0]   SThreadID;
    logic                  SRespLast;
    logic                  SInterrupt;
  } ocp_s2m_t;

  // Packet types carried in the control flit
  typedef enum logic [1:0] {
    PKT_WRITE = 2'd0,
    PKT_READ  = 2'd1,
    PKT_CFG   = 2'd2,
    PKT_RESP  = 2'd3
  } pkt_type_e;
  // An interrupt packet is a PKT_RESP control flit alone, with intr set.

  typedef struct packed {
    pkt_type_e             ptype;
    logic [THREAD_W-1:0]   thread;
    logic [BURST_W-1:0]    blen;
    ocp_resp_e             sresp;
    logic                  intr;     // interrupt packet: level in intr_level
    logic                  intr_level;
    logic [3:0]            rsv;
    logic [PATH_W-1:0]     retpath;
  } ctrl_t;

  typedef struct packed {
    logic                  eop;
    logic [FLIT_W-1:0]     data;
  } flit_t;

  typedef struct packed {
    logic [PORT_W-1:0]                     port;
    logic [NFLITS_W-1:0]                   nflits;  // 1..CHUNK_FLITS
    logic                                  eop;     // chunk ends the packet
    logic [CHUNK_FLITS-1:0][FLIT_W-1:0]    flits;   // flits[0] is sent first
  } chunk_t;

  // One OCP request or write-data word, passed between handshaking and
  // encap/decap blocks.
  typedef struct packed {
    logic                  first;    // carries the request phase
    ocp_cmd_e              cmd;
    logic [ADDR_W-1:0]     addr;
    logic [BURST_W-1:0]    blen;
    logic [THREAD_W-1:0]   thread;
    logic [CONN_W-1:0]     conn;
    logic                  has_data;
    logic [DATA_W-1:0]     data;
    logic                  last;
  } req_item_t;

  // One OCP response word
  typedef struct packed {
    ocp_resp_e             sresp;
    logic [DATA_W-1:0]     data;
    logic [THREAD_W-1:0]   thread;
    logic                  last;
  } resp_item_t;

  // Entry of the target's response path FIFO
  typedef struct packed {
    logic [PORT_W-1:0]     port;
    logic [PATH_W-1:0]     retpath;
    logic [THREAD_W-1:0]   thread;
    logic [BURST_W-1:0]    blen;
  } resp_path_t;

endpackage
