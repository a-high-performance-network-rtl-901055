// ni_pkg: types and constants shared by the network-interface blocks.
//
// Link format. A flit is 32 data bits plus head/tail sideband bits, moved with
// a valid/ready handshake. A packet is one header flit, then, for requests, one
// address flit, then 0..8 data flits. Read requests are 2 flits, write requests
// 2+burst, read responses 1+burst, write responses a single header flit.
//
// Header flit layout (32 bits, this design's own encoding):
//   [31:27] destination node   [26:22] source node   [21:20] message type
//   [19:16] AXI transaction ID [15:13] sequence number [12:10] burst length-1
//   [9:8]   AXI response code  [7:0]   reserved (zero)
// The 32-bit flit, the 4-bit transaction ID, the 3-bit sequence number and
// bursts of 1..8 beats follow the document; the field order is a choice.
package ni_pkg;
  localparam int FLIT_W = 32;  // flit / AXI data width
  localparam int ADDR_W = 32;  // AXI address width
  localparam int TID_W  = 4;   // AXI transaction ID width
  localparam int SEQ_W  = 3;   // sequence number width
  localparam int LEN_W  = 3;   // burst length - 1 (1..8 beats)
  localparam int NODE_W = 5;   // node address (5x5 mesh fits in 32 nodes)
  localparam int RESP_W = 2;   // AXI xRESP width

  typedef enum logic [1:0] {
    MT_RD_REQ  = 2'd0,
    MT_WR_REQ  = 2'd1,
    MT_RD_RESP = 2'd2,
    MT_WR_RESP = 2'd3
  } msg_type_e;

  typedef struct packed {
    logic [NODE_W-1:0] dst;
    logic [NODE_W-1:0] src;
    msg_type_e         typ;
    logic [TID_W-1:0]  tid;
    logic [SEQ_W-1:0]  seq;
    logic [LEN_W-1:0]  len;
    logic [RESP_W-1:0] resp;
    logic [7:0]        rsvd;
  } hdr_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // A request message as buffered by the AXI-Queue.
  typedef struct packed {
    logic              is_write;
    logic [TID_W-1:0]  tid;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } req_msg_t;

  // Write data beat.
  typedef struct packed {
    logic [FLIT_W-1:0] data;
    logic              last;
  } wbeat_t;

  // True for response packets (read or write response).
  function automatic logic is_resp(msg_type_e t);
    return t[1];
  endfunction
endpackage
