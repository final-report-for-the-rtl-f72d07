// atm_pkg: cell formats, state vector layout and shared constants of the ATM
// encryptor.
//
// Cells move between blocks whole: a 32-bit UNI header (GFC, VPI, VCI, PTI,
// CLP; the HEC octet belongs to the physical layer and is not carried) and the
// 384-bit payload, one cell per valid/ready transfer. After identification a
// cell is tagged with its connection context index and its class.
//
// The counter-mode state vector (SV) has the fields the counter mode needs:
// an LFSR, the Initiator/Responder bit, a jump number, a cell sequence number
// and the number of the 64-bit segment within the cell. Their widths, the LFSR
// taps and preset, and the resync cell layout are this implementation's
// choices (see README); the field set and the resync stepping rule follow the
// design.
package atm_pkg;

  localparam int PAYLOAD_BITS = 384;   // 48-octet ATM payload
  localparam int BLOCK_BITS   = 64;    // one DES block
  localparam int CELL_BLOCKS  = PAYLOAD_BITS / BLOCK_BITS;   // 6 blocks per payload

  localparam int NUM_CTX = 256;        // connection contexts per cryptographic module
  localparam int CTX_W   = $clog2(NUM_CTX);

  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pti;
    logic        clp;
  } atm_hdr_t;

  typedef struct packed {
    atm_hdr_t                 hdr;
    logic [PAYLOAD_BITS-1:0]  payload;   // octet 0 in bits [383:376]
  } cell_t;

  typedef enum logic [2:0] {
    CLS_USER      = 3'd0,   // user data, counter-mode encrypt/decrypt
    CLS_BYPASS    = 3'd1,   // passes the security module unchanged
    CLS_RESYNC_RX = 3'd2,   // received resync cell, extracted from the stream
    CLS_RESYNC_TX = 3'd3,   // request to insert a resync cell on this connection
    CLS_NRT       = 3'd4    // handled by the non-real-time control
  } cell_cls_e;

  typedef struct packed {
    cell_cls_e         cls;
    logic [CTX_W-1:0]  ctx;
    cell_t             data;
  } tcell_t;

  // Counter-mode state vector, also the DES input block: one 64-bit word.
  typedef struct packed {
    logic [20:0] lfsr;
    logic        ir;     // Initiator/Responder
    logic [7:0]  jn;     // jump number
    logic [30:0] seq;    // cell sequence number
    logic [2:0]  seg;    // 64-bit segment within the payload, 0..5
  } sv_t;

  localparam logic [20:0] LFSR_PRESET = 21'h1F_FFFF;

  // Payload type values of F5 OAM cells (segment and end-to-end).
  localparam logic [2:0] PTI_OAM_SEG = 3'b100;
  localparam logic [2:0] PTI_OAM_E2E = 3'b101;
  // First payload octet that marks an OAM cell as a cryptographic resync cell.
  localparam logic [7:0] RESYNC_CODE = 8'hA5;
  localparam logic [7:0] OAM_FILL    = 8'h6A;

  // 21-bit Fibonacci LFSR, taps 21 and 19, stepped once per cell.
  function automatic logic [20:0] lfsr_step(input logic [20:0] l);
    return {l[19:0], l[20] ^ l[18]};
  endfunction

  // SV after a user cell: next sequence number, LFSR stepped, segment 0.
  function automatic sv_t sv_next_cell(input sv_t s);
    sv_t n;
    n      = s;
    n.seq  = s.seq + 31'd1;
    n.lfsr = lfsr_step(s.lfsr);
    n.seg  = '0;
    return n;
  endfunction

  // SV after a resync: jump number incremented (or taken from the received
  // cell), I/R bit set, sequence and segment numbers cleared, LFSR preset.
  function automatic sv_t sv_jump(input logic [7:0] jn, input logic ir);
    sv_t n;
    n.lfsr = LFSR_PRESET;
    n.ir   = ir;
    n.jn   = jn;
    n.seq  = '0;
    n.seg  = '0;
    return n;
  endfunction

  // Resync payload without its CRC: code octet, the 64-bit SV, fill octets,
  // then 16 bits holding 6 reserved zero bits and the CRC-10 (bits [9:0]).
  function automatic logic [PAYLOAD_BITS-1:0] resync_payload(input sv_t s);
    logic [PAYLOAD_BITS-1:0] p;
    p = '0;
    p[383:376] = RESYNC_CODE;
    p[375:312] = s;
    for (int i = 0; i < 37; i++) p[311-8*i -: 8] = OAM_FILL;
    return p;
  endfunction

endpackage
