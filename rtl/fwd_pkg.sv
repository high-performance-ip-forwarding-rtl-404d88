// fwd_pkg: types and constants shared by the pipelined IP lookup controller.
//
// A packet travels through the controller as a record that grows phase by
// phase: the raw header chunk fetched from an Rx SAR (hdr_rec_t), the
// verified and analysed header (p1_t), the lookup result (p2_t), the label
// information (p3_t) and finally the outgoing descriptor (out_desc_t) that
// the classifier puts into a priority queue and the scheduler transmits.
//
// The document fixes the 32-bit datapath of the label information SRAM, the
// 8-byte label information entry, the 64-bit CAM word, the 128K-entry
// forwarding table, the four 622 Mbit/s ports and the four encapsulations
// (IPOA, PPP, MPLS, null). The header chunk size, the field layout of the
// label information entry and the DS-to-queue mapping are this design's own.
package fwd_pkg;

  // Four Rx / Tx SAR controllers (one per 622 Mbit/s switch port).
  localparam int unsigned NPORTS     = 4;
  localparam int unsigned PORT_W     = 2;
  // Header chunk sent over the header path: 8 words = 32 bytes covers the
  // longest encapsulation (LLC/SNAP 8 B), an MPLS shim (4 B), the 20-byte
  // IPv4 header and the L4 port numbers.
  localparam int unsigned HDR_WORDS  = 8;
  localparam int unsigned HDR_BYTES  = HDR_WORDS * 4;
  // The outgoing header can grow by up to two words (LLC/SNAP + new shim).
  localparam int unsigned OUT_WORDS  = HDR_WORDS + 2;
  // Routing coprocessor: up to 128K entries, 64-bit words.
  localparam int unsigned CAM_IDX_W  = 17;
  // Label information table: one 8-byte entry per CAM index, 32-bit SRAM.
  localparam int unsigned LIB_ADDR_W = CAM_IDX_W + 1;
  // Output (priority) queues.
  localparam int unsigned NPRIO      = 4;
  localparam int unsigned PRIO_W     = 2;

  // Encapsulation of the virtual circuit a packet came in on / goes out on.
  typedef enum logic [1:0] {
    ENC_IPOA = 2'd0,   // RFC 2684 LLC/SNAP, 8 bytes
    ENC_PPP  = 2'd1,   // PPP over AAL5, FF 03 + protocol, 4 bytes
    ENC_MPLS = 2'd2,   // label stack directly on the VC
    ENC_NULL = 2'd3    // bare IPv4 datagram (VC multiplexing)
  } encap_e;

  // Result of header analysis.
  typedef enum logic [1:0] {
    K_IPV4 = 2'd0,
    K_MPLS = 2'd1,
    K_CTRL = 2'd2,     // ATMARP, PPP control: not looked up
    K_ERR  = 2'd3      // header failed verification: not looked up
  } kind_e;

  // Why a packet takes the control/error path.
  typedef enum logic [2:0] {
    X_NONE     = 3'd0,
    X_CTRL     = 3'd1,  // control protocol packet
    X_VERSION  = 3'd2,  // IP version is not 4
    X_TTL      = 3'd3,  // TTL (or label TTL) would expire
    X_CHECKSUM = 3'd4,  // IP header checksum wrong
    X_OPTION   = 3'd5,  // IP options present / label stack deeper than one
    X_NOROUTE  = 3'd6   // lookup found no entry
  } exc_e;

  // Label operation held in the label information entry.
  typedef enum logic [1:0] {
    OP_IP   = 2'd0,     // plain IP forwarding
    OP_PUSH = 2'd1,     // IP in, MPLS out
    OP_SWAP = 2'd2,     // MPLS in, MPLS out
    OP_POP  = 2'd3      // MPLS in, IP out
  } lblop_e;

  // CAM (routing coprocessor) instructions.
  typedef enum logic [1:0] {
    CAM_LPM   = 2'd0,   // longest prefix match on a ternary-encoded list
    CAM_EXACT = 2'd1,   // 64-bit exact match
    CAM_WRITE = 2'd2    // write a 64-bit entry at an index
  } cam_op_e;

  // 8-byte label information entry (two 32-bit SRAM words, high word first).
  typedef struct packed {
    encap_e              out_encap;  // [63:62]
    logic [PORT_W-1:0]   tx_port;    // [61:60]
    lblop_e              op;         // [59:58]
    logic                ds_replace; // [57]
    logic [5:0]          ds;         // [56:51] outgoing DS code point
    logic [2:0]          exp;        // [50:48] outgoing MPLS EXP
    logic [3:0]          hop;        // [47:44] TTL decrement (hop count)
    logic [3:0]          rsvd;       // [43:40]
    logic [19:0]         label;      // [39:20] outgoing label
    logic [19:0]         rsvd2;      // [19:0]
  } lib_t;

  // Header chunk as fetched from an Rx SAR.
  typedef struct packed {
    logic [HDR_WORDS-1:0][31:0] w;   // w[0] is the first word on the wire
    logic [15:0]                len; // whole frame length in bytes
    encap_e                     encap;
    logic [PORT_W-1:0]          port;
  } hdr_rec_t;

  // After phase 1.
  typedef struct packed {
    hdr_rec_t     h;
    kind_e        kind;
    exc_e         exc;
    logic [1:0]   l2w;    // words of link-layer header before shim/IP
    logic [2:0]   ipw;    // word index of the IPv4 header
    logic [63:0]  key;    // CAM search key
    logic [5:0]   in_ds;  // incoming DS code point (0 if none)
  } p1_t;

  // After phase 2.
  typedef struct packed {
    p1_t                  p;
    logic [CAM_IDX_W-1:0] index;
  } p2_t;

  // After phase 3.
  typedef struct packed {
    p2_t   q;
    lib_t  lib;
  } p3_t;

  // Outgoing descriptor: modified header plus what the scheduler needs to
  // fetch the payload and address the Tx SAR.
  typedef struct packed {
    logic [OUT_WORDS-1:0][31:0] w;
    logic [3:0]                 hdr_nw;  // header words to send
    logic [15:0]                pl_nw;   // payload words still in the Rx SAR
    logic [15:0]                len;     // outgoing frame length in bytes
    logic [PORT_W-1:0]          tx_port;
    logic [PORT_W-1:0]          rx_port;
    logic [5:0]                 ds;
    logic                       exc;     // sent to the exception port unmodified
  } out_desc_t;

  // Payload words left in the Rx SAR after the header chunk.
  function automatic logic [15:0] payload_words(input logic [15:0] len);
    logic [15:0] rem;
    rem = (len > 16'(HDR_BYTES)) ? (len - 16'(HDR_BYTES)) : 16'd0;
    return (rem + 16'd3) >> 2;
  endfunction

  // Words of the header chunk that carry packet data.
  function automatic logic [3:0] chunk_words(input logic [15:0] len);
    logic [15:0] nw;
    nw = (len + 16'd3) >> 2;
    return (nw > 16'(HDR_WORDS)) ? 4'(HDR_WORDS) : nw[3:0];
  endfunction

  // Ternary encoding of an address/mask pair into one 64-bit CAM word:
  // upper half address AND mask, lower half mask AND NOT address. A bit with
  // mask 0 stores (0,0) and matches anything.
  function automatic logic [63:0] tcam_encode(input logic [31:0] addr,
                                               input logic [31:0] mask);
    return {addr & mask, mask & ~addr};
  endfunction

  // Mask with the given number of leading ones.
  function automatic logic [31:0] prefix_mask(input logic [5:0] plen);
    return (plen >= 6'd32) ? 32'hFFFF_FFFF : ~(32'hFFFF_FFFF >> plen);
  endfunction

  // One's-complement sum of the ten 16-bit words of a 20-byte IPv4 header,
  // folded to 16 bits.
  function automatic logic [15:0] ip_sum(input logic [4:0][31:0] ip);
    logic [19:0] s;
    s = '0;
    for (int i = 0; i < 5; i++) s = s + 20'(ip[i][31:16]) + 20'(ip[i][15:0]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    return s[15:0];
  endfunction

  // DS code point to output queue (3 = highest priority): class selector
  // 5..7 (EF, network control) -> 3, 3..4 -> 2, 1..2 -> 1, 0 -> 0.
  function automatic logic [PRIO_W-1:0] ds_to_prio(input logic [5:0] ds);
    unique case (ds[5:3])
      3'd7, 3'd6, 3'd5: return 2'd3;
      3'd4, 3'd3:       return 2'd2;
      3'd2, 3'd1:       return 2'd1;
      default:          return 2'd0;
    endcase
  endfunction

endpackage
