// pnp_pkg: constants and bundle types shared by the plug-and-play modules
// handler.
//
// A general purpose register is sixteen 32-bit locations; location 0 is the
// ID field that selects which module type the register serves. The serial
// link to a module moves 36-bit packets, least-significant bit first: a
// 32-bit data word in bits [31:0] and a 4-bit location offset in [35:32].
// These sizes, the 0xAA identification request, the 0x8000000AA alternate
// request and the 0x00 / 0xCC packet headers follow the protocol
// description. The two struct bundles (register to host connector and back)
// are this design's own way of carrying the "wired connection" the switch
// makes between a register and a host connector.
package pnp_pkg;

  localparam int DATA_W  = 32;             // width of one register location
  localparam int N_LOC   = 16;             // locations per general purpose register
  localparam int OFS_W   = $clog2(N_LOC);  // location offset width (4)
  localparam int PKT_W   = DATA_W + OFS_W; // serial packet length (36)
  localparam int BITC_W  = $clog2(PKT_W);  // bit counter width

  localparam logic [PKT_W-1:0] PKT_ID_REQ     = 36'h0_0000_00AA; // identification request
  localparam logic [PKT_W-1:0] PKT_ID_REQ_ALT = 36'h8_0000_00AA; // alternate request (retry)
  localparam logic [PKT_W-1:0] PKT_HDR_NONE   = 36'h0_0000_0000; // header: nothing follows
  localparam logic [PKT_W-1:0] PKT_HDR_VALID  = 36'h0_0000_00CC; // header: valid data follows

  localparam logic [DATA_W-1:0] ID_NONE = '0; // an ID of 0 marks "no module / not programmed"

  // True when a received packet is either form of identification request.
  function automatic logic is_id_request(logic [PKT_W-1:0] p);
    return (p == PKT_ID_REQ) || (p == PKT_ID_REQ_ALT);
  endfunction

  // Data packet: 32-bit word followed (higher bits, sent later) by the offset.
  function automatic logic [PKT_W-1:0] make_data_pkt(logic [OFS_W-1:0] ofs,
                                                     logic [DATA_W-1:0] data);
    return {ofs, data};
  endfunction

  // Register side of a connection, as seen by a host connector.
  typedef struct packed {
    logic [DATA_W-1:0] id;        // location 0, the ID field
    logic              upd;       // some location was updated by the CPU
    logic [OFS_W-1:0]  upd_addr;  // lowest updated location
    logic [DATA_W-1:0] upd_data;  // its contents
  } reg2hc_t;

  // Host connector side of a connection, as seen by a register.
  typedef struct packed {
    logic              ack;      // one-cycle pulse: location ack_addr was sent
    logic [OFS_W-1:0]  ack_addr;
    logic              we;       // one-cycle pulse: module wrote a location
    logic [OFS_W-1:0]  waddr;
    logic [DATA_W-1:0] wdata;
  } hc2reg_t;

endpackage
