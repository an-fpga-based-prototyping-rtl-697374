// ipc_pkg: types and constants shared by the network interface card (NIC)
// and the buffered-crossbar switch.
//
// Packet header (64 bits, sent most significant byte first on the link):
//   size (10) | flow (7) | op (5) | reseq (10) | addr (32)
// The five fields and their widths are the platform's; their order is this
// design's choice. The size field goes first and counts the payload in 32-bit
// words (at most 128 for a 512-byte payload), so its top bit is always 0. On
// the link a credit starts with a 1 bit, which is how a receiver tells a
// credit from a header after the start-of-packet symbol.
//
// Credit (16 bits): 1 | flow (7) | value (7) | parity (1). The value is the
// 7 most significant bits of a 12-bit cumulative forwarded-word counter. The
// parity bit makes the XOR of all 16 bits zero (this design's choice).
//
// Transfer descriptor (two 64-bit words): word 0 is the local source address.
// Word 1 holds dst_addr[31:0], size[41:32] in 64-bit words (1..512),
// flow[48:42], op[53:49] and start flag [63]. The field contents follow the
// platform; the bit positions are this design's choice.
//
// The CRC polynomials are not specified by the platform. This design uses
// CRC-16-CCITT (0x1021, init 0xFFFF) for the header and CRC-32 (0x04C11DB7,
// init 0xFFFFFFFF, MSB first, no final XOR) for the payload.
package ipc_pkg;

  localparam int FLOW_W  = 7;
  localparam int OP_W    = 5;
  localparam int RESEQ_W = 10;
  localparam int SIZE_W  = 10;
  localparam int ADDR_W  = 32;

  // Link control symbols (8b/10b K characters).
  localparam logic [7:0] K_SOP   = 8'hFB;  // K27.7, start of packet
  localparam logic [7:0] K_COMMA = 8'hBC;  // K28.5, idle / comma

  // Operation bits carried in the header and in the descriptor opcode.
  localparam int OP_LOCAL_NOTIFY  = 0;  // descriptor only: write queue pointer home when sent
  localparam int OP_REMOTE_IRQ    = 1;  // interrupt receiver after this packet (resequenced)
  localparam int OP_REMOTE_NOTIFY = 2;  // flag-setting write at the receiver
  localparam int OP_ZERO_PAYLOAD  = 3;  // benchmark mode: do not read host memory, send zeros

  // Largest packet payload: 512 bytes = 128 words of 32 bits.
  localparam int MAX_PKT_W32 = 128;

  typedef struct packed {
    logic [SIZE_W-1:0]  size;   // payload length in 32-bit words
    logic [FLOW_W-1:0]  flow;   // destination flow
    logic [OP_W-1:0]    op;
    logic [RESEQ_W-1:0] reseq;  // {src[2:0], path[1:0], seq[4:0]}
    logic [ADDR_W-1:0]  addr;   // destination address at the target
  } pkt_hdr_t;

  typedef struct packed {
    logic              is_credit;  // always 1
    logic [FLOW_W-1:0] flow;
    logic [6:0]        value;
    logic              parity;
  } credit_t;

  typedef struct packed {
    logic              start;
    logic [8:0]        rsvd;
    logic [OP_W-1:0]   op;
    logic [FLOW_W-1:0] flow;
    logic [9:0]        size;      // 64-bit words, 1..512
    logic [31:0]       dst_addr;
  } desc_w1_t;

  function automatic credit_t make_credit(input logic [FLOW_W-1:0] flow,
                                          input logic [6:0] value);
    credit_t c;
    c.is_credit = 1'b1;
    c.flow      = flow;
    c.value     = value;
    c.parity    = ^{1'b1, flow, value};
    return c;
  endfunction

  function automatic logic [15:0] crc16_byte(input logic [15:0] crc,
                                             input logic [7:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc,
                                             input logic [7:0] d);
    logic [31:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[31] ^ d[i]) c = {c[30:0], 1'b0} ^ 32'h04C11DB7;
      else              c = {c[30:0], 1'b0};
    end
    return c;
  endfunction

endpackage
