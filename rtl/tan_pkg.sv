// tan_pkg: types and constants shared by the Test Area Network (TAN) RTL.
//
// A TAN frame is the payload of an Ethernet MAC frame. It starts with an
// 8-byte header: 16-bit destination address, 16-bit source address, 8-bit
// command (CMD), 16-bit number of patterns and 8-bit pattern length in bits,
// followed by the patterns (or expected responses) themselves. Field order,
// widths, the 46-byte minimum and 1492-byte maximum TAN payload follow the
// protocol definition. The command codes, the broadcast address, the byte
// order (most significant byte first) and the packing of one pattern into
// ceil(len/8) bytes are this design's own choices.
package tan_pkg;

  localparam int unsigned MIN_FRAME     = 46;    // minimum MAC payload
  localparam int unsigned MAX_PAYLOAD   = 1492;  // 1500 - 8 header bytes
  localparam int unsigned PINS          = 256;   // longest pattern, bits

  localparam logic [15:0] ADDR_BCAST  = 16'hFFFF;
  localparam logic [15:0] ADDR_SERVER = 16'h0000;

  typedef enum logic [7:0] {
    CMD_RST = 8'h01,  // reset: start a new batch
    CMD_SYN = 8'h02,  // start of a new test sequence
    CMD_BRP = 8'h10,  // broadcast patterns
    CMD_BRS = 8'h11,  // broadcast expected signatures
    CMD_PAS = 8'h20,  // client passed
    CMD_FAI = 8'h21,  // client failed; payload = captured responses
    CMD_ERR = 8'h22,  // client problem
    CMD_STP = 8'h30,  // stop (isolate) a failed client
    CMD_ALR = 8'h31   // alert a client that did not answer
  } tan_cmd_e;

  typedef struct packed {
    logic [15:0] dst;
    logic [15:0] src;
    logic [7:0]  cmd;
    logic [15:0] npat;
    logic [7:0]  plen;   // pattern length in bits, 0 means 256
  } tan_hdr_t;

  // Bytes one pattern occupies in the payload.
  function automatic logic [5:0] pat_bytes(input logic [7:0] plen);
    return (plen == 8'd0) ? 6'd32 : 6'((plen + 9'd7) >> 3);
  endfunction

  // Whole patterns that fit in one frame's payload.
  function automatic logic [15:0] max_pats(input logic [7:0] plen);
    return 16'(MAX_PAYLOAD / int'(pat_bytes(plen)));
  endfunction

  // Mask of the valid bits of a pattern.
  function automatic logic [PINS-1:0] pat_mask(input logic [7:0] plen);
    return (plen == 8'd0) ? '1 : ~({PINS{1'b1}} << plen);
  endfunction

endpackage
