// henna_pkg: types and constants shared by the two-stage (hierarchical)
// in-switch packet classifier.
//
// The classifier sees the first WIN_BYTES bytes of every packet (the header
// window) in one beat. Nine packet-level features are extracted from it: the
// six TCP flags ACK, SYN, PUSH, ECE, RESET and FIN, the TCP/UDP source and
// destination ports and the packet length. These, the 21 device classes and
// the 5 class groups follow the published use case. The window size, the
// 16-bit feature width, the per-tree code width, the certainty width and the
// layout of the one-byte classification header are this design's choices.
package henna_pkg;

  // ---------------- packet window ----------------
  localparam int unsigned WIN_BYTES = 64;          // header bytes seen per packet
  typedef logic [7:0] byte_t;
  typedef byte_t [WIN_BYTES-1:0] win_t;            // index i = byte offset i on the wire

  // ---------------- features ----------------
  localparam int unsigned FEAT_W = 16;
  localparam int unsigned N_FEAT = 9;
  localparam int unsigned FIDX_W = $clog2(N_FEAT);
  typedef enum logic [FIDX_W-1:0] {
    F_ACK = 0, F_SYN = 1, F_PSH = 2, F_ECE = 3, F_RST = 4, F_FIN = 5,
    F_SPORT = 6, F_DPORT = 7, F_LEN = 8
  } feat_idx_e;
  typedef logic [FEAT_W-1:0] feat_t;
  typedef feat_t [N_FEAT-1:0] feat_vec_t;

  // Packet header vector content used by the classifier
  typedef struct packed {
    logic      ipv4;   // IPv4 packet: classified; anything else bypasses
    feat_vec_t feat;
  } phv_t;

  // ---------------- model sizes ----------------
  localparam int unsigned CODE_W    = 16;          // code bits per feature per tree
  localparam int unsigned KEY_W     = N_FEAT * CODE_W; // code-table key of one tree
  localparam int unsigned N_CLASSES = 21;
  localparam int unsigned N_GROUPS  = 5;
  localparam int unsigned CLASS_W   = 5;           // holds a class or a group id
  localparam int unsigned GROUP_W   = 3;
  localparam int unsigned CERT_W    = 8;           // tree certainty, 255 = 1.0
  typedef logic [CLASS_W-1:0] class_t;
  typedef logic [CERT_W-1:0]  cert_t;

  // ---------------- classification header ----------------
  // One byte appended behind the header window. After ingress it holds the
  // class group (final=0); after egress the device class (final=1).
  typedef struct packed {
    logic   valid;   // a label is present
    logic   final_c; // 0: class group from stage 1, 1: device class from stage 2
    logic   rsvd;
    class_t id;
  } henna_tag_t;

  typedef struct packed {
    win_t       hdr;
    henna_tag_t tag;
  } pkt_t;

  // ---------------- control-plane table writes ----------------
  typedef enum logic {STG_INGRESS = 1'b0, STG_EGRESS = 1'b1} stage_e;
  typedef enum logic {TBL_FEATURE = 1'b0, TBL_CODE = 1'b1} tbl_kind_e;
  localparam int unsigned MAX_TREES = 8;           // widest forest the write port carries
  localparam int unsigned CFG_AW    = 8;           // tables up to 256 entries

  // One table-entry write. Feature tables use valid/lo/hi/code, code tables
  // valid/value/mask/cls/cert. `idx` selects the feature (feature table) or
  // the tree (ingress code table); `group` selects the egress tree.
  typedef struct packed {
    logic                           we;
    stage_e                         stage;
    tbl_kind_e                      kind;
    logic [GROUP_W-1:0]             group;
    logic [3:0]                     idx;
    logic [CFG_AW-1:0]              addr;
    logic                           valid;
    feat_t                          lo;
    feat_t                          hi;
    logic [MAX_TREES*CODE_W-1:0]    code;
    logic [KEY_W-1:0]               value;
    logic [KEY_W-1:0]               mask;
    class_t                         cls;
    cert_t                          cert;
  } cfg_wr_t;

  // ---------------- header extraction ----------------
  // Reads the features out of an Ethernet/IPv4/TCP-or-UDP header window.
  // Fields of an L4 header that is absent, or lies beyond the window, read 0.
  function automatic phv_t extract_features(win_t w);
    phv_t        p;
    logic [15:0] ethertype;
    logic [3:0]  ihl;
    logic [7:0]  proto;
    logic        first_frag;
    int unsigned l4;
    logic        tcp_ok, udp_ok;
    logic [7:0]  flags;
    ethertype  = {w[12], w[13]};
    ihl        = w[14][3:0];
    proto      = w[23];
    first_frag = ({w[20][4:0], w[21]} == 13'd0);
    p.ipv4     = (ethertype == 16'h0800) && (w[14][7:4] == 4'd4) && (ihl >= 4'd5);
    l4         = 14 + 4 * int'(ihl);
    tcp_ok     = p.ipv4 && first_frag && proto == 8'd6  && (l4 + 20 <= WIN_BYTES);
    udp_ok     = p.ipv4 && first_frag && proto == 8'd17 && (l4 + 8  <= WIN_BYTES);
    if (!(tcp_ok || udp_ok)) l4 = 0;   // keep the byte indices in range
    flags      = tcp_ok ? w[l4 + 13] : 8'h00;
    p.feat          = '0;
    p.feat[F_FIN]   = FEAT_W'(flags[0]);
    p.feat[F_SYN]   = FEAT_W'(flags[1]);
    p.feat[F_RST]   = FEAT_W'(flags[2]);
    p.feat[F_PSH]   = FEAT_W'(flags[3]);
    p.feat[F_ACK]   = FEAT_W'(flags[4]);
    p.feat[F_ECE]   = FEAT_W'(flags[6]);
    p.feat[F_SPORT] = (tcp_ok || udp_ok) ? {w[l4],     w[l4 + 1]} : 16'h0;
    p.feat[F_DPORT] = (tcp_ok || udp_ok) ? {w[l4 + 2], w[l4 + 3]} : 16'h0;
    p.feat[F_LEN]   = p.ipv4 ? {w[16], w[17]} : 16'h0;
    return p;
  endfunction

endpackage
