// pkt_pkg: field layout, command codes and check-bit functions of the generic
// packet protocol that both translators speak on their packet side.
//
// A packet is a sequence of FLIT_W-bit flits. The header flit carries the
// fields LEN (6 bits, packet length in flits), CMD (8), TID (8) and ECC (5).
// RdReq16 (CMD 0) is a header plus one address flit; RdResp16 (CMD 1) is a
// header, an address flit {SID 4, H 1, rd_address 32, ECC 3} and four data
// flits {data 32, CD 3, ECC 5}, six flits in all. The field names and widths
// follow the protocol description; the flit width (40, the widest flit), the
// bit placement (fields packed from the MSB down), the content of RdReq16 and
// the check-bit code (an XOR fold of the flit's other bits) are this design's
// choices.
package pkt_pkg;

  localparam int unsigned FLIT_W   = 40;
  localparam int unsigned DATA_W   = 32;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned LEN_W    = 6;
  localparam int unsigned CMD_W    = 8;
  localparam int unsigned TID_W    = 8;
  localparam int unsigned SID_W    = 4;
  localparam int unsigned CD_W     = 3;

  // Words carried by one RdResp16 packet (16 bytes of 4-byte words).
  localparam int unsigned PKT_WORDS = 4;

  typedef logic [FLIT_W-1:0] flit_t;

  typedef enum logic [CMD_W-1:0] {
    CMD_RDREQ16  = 8'd0,
    CMD_RDRESP16 = 8'd1
  } cmd_e;

  localparam logic [LEN_W-1:0] LEN_RDREQ16  = 6'd2;
  localparam logic [LEN_W-1:0] LEN_RDRESP16 = 6'd6;

  typedef struct packed {
    logic [LEN_W-1:0] len;
    logic [CMD_W-1:0] cmd;
    logic [TID_W-1:0] tid;
    logic [4:0]       ecc;
    logic [12:0]      pad;
  } hdr_flit_t;

  typedef struct packed {
    logic [SID_W-1:0]  sid;
    logic              h;
    logic [ADDR_W-1:0] addr;
    logic [2:0]        ecc;
  } addr_flit_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [CD_W-1:0]   cd;
    logic [4:0]        ecc;
  } data_flit_t;

  // XOR fold of a 40-bit word into 5 check bits (bit i collects bits i, i+5, ...).
  function automatic logic [4:0] fold5(input logic [FLIT_W-1:0] v);
    logic [4:0] r;
    r = '0;
    for (int i = 0; i < FLIT_W; i++) r[i%5] ^= v[i];
    return r;
  endfunction

  // XOR fold into 3 check bits.
  function automatic logic [2:0] fold3(input logic [FLIT_W-1:0] v);
    logic [2:0] r;
    r = '0;
    for (int i = 0; i < FLIT_W; i++) r[i%3] ^= v[i];
    return r;
  endfunction

  function automatic flit_t make_hdr(input logic [LEN_W-1:0] len, input cmd_e cmd,
                                     input logic [TID_W-1:0] tid);
    hdr_flit_t h;
    h.len = len; h.cmd = cmd; h.tid = tid; h.ecc = '0; h.pad = '0;
    h.ecc = fold5(flit_t'(h));
    return flit_t'(h);
  endfunction

  function automatic flit_t make_addr(input logic [SID_W-1:0] sid, input logic hbit,
                                      input logic [ADDR_W-1:0] addr);
    addr_flit_t a;
    a.sid = sid; a.h = hbit; a.addr = addr; a.ecc = '0;
    a.ecc = fold3(flit_t'(a));
    return flit_t'(a);
  endfunction

  function automatic flit_t make_data(input logic [DATA_W-1:0] data,
                                      input logic [CD_W-1:0] cd);
    data_flit_t d;
    d.data = data; d.cd = cd; d.ecc = '0;
    d.ecc = fold5(flit_t'(d));
    return flit_t'(d);
  endfunction

  // Check bits of a received flit: true when they match the rest of the flit.
  // Each recomputes the code with the check field cleared.
  function automatic logic hdr_ok(input flit_t f);
    flit_t c;
    c = f;
    c[17:13] = '0;
    return fold5(c) == f[17:13];
  endfunction

  function automatic logic addr_ok(input flit_t f);
    flit_t c;
    c = f;
    c[2:0] = '0;
    return fold3(c) == f[2:0];
  endfunction

  function automatic logic data_ok(input flit_t f);
    flit_t c;
    c = f;
    c[4:0] = '0;
    return fold5(c) == f[4:0];
  endfunction

endpackage
