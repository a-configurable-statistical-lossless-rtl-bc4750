// ppmh_pkg -- types, constants and helper functions shared by the PPMH
// compression core.
//
// The core codes every byte as a walk down a 256-leaf binary tree of
// frequency counts and sends each left/right decision, with its two counts,
// to a binary arithmetic coder.  This package holds the sizes the source
// design gives (1024 context areas, 10-bit counts, 1312 tree nodes, 41x32
// free map, 512x7 LPS table, search limit 10), the event type that runs
// from the probability estimator to the coder, and the formula that fills
// the LPS table.  Increments, hash shift and the scale limit are this
// design's own choices.  Not every module uses every constant, so a lint
// run on one module alone reports some of them as unused.
package ppmh_pkg;

  localparam int SYM_W        = 8;     // byte alphabet
  localparam int CNT_W        = 10;    // frequency counts
  localparam int MAX_ORDER    = 4;     // deepest context the hardware supports
  localparam int SEARCH_LIMIT = 10;    // probes per context search
  localparam int HASH_SHIFT   = 2;     // symbol shift before the XOR with the prefix area
  localparam int PROBE_INC    = 1;     // index step after a failed probe
  localparam int ESC_INC      = 1;     // escape count increment on a new symbol
  localparam int SCALE_LIMIT  = 1008;  // total at which a context is halved on its next visit
  localparam int R_W          = 7;     // coder range width
  localparam int R_INIT       = 127;   // coder range after reset
  localparam int ORD_W        = $clog2(MAX_ORDER + 2);

  // Symbol increment per model order: higher orders adapt faster.
  function automatic logic [CNT_W-1:0] order_inc(input logic [ORD_W-1:0] ord);
    return CNT_W'(ord) + CNT_W'(1);
  endfunction

  // One node of the probability tree: count of the left subtree plus
  // pending reset and pending halving flags for each child (14 bits).
  typedef struct packed {
    logic             rst_l;
    logic             rst_r;
    logic             scl_l;
    logic             scl_r;
    logic [CNT_W-1:0] cnt;
  } pnode_t;

  // Events from the probability estimator to the arithmetic coder.
  typedef enum logic [2:0] {
    EV_BIT      = 3'd0,   // code one binary decision
    EV_COMMIT   = 3'd1,   // the decisions since the last commit are final
    EV_ROLLBACK = 3'd2,   // discard the decisions since the last commit
    EV_FLUSH    = 3'd3,   // shift out the whole coder register
    EV_END      = 3'd4    // drain pending bits, pad the last byte, restart
  } ev_kind_t;

  typedef struct packed {
    ev_kind_t         kind;
    logic [CNT_W-1:0] cum0;   // count of the left branch ("middle")
    logic [CNT_W-1:0] cum1;   // count of both branches ("top")
    logic             dec;    // 0 = left, 1 = right
  } ac_event_t;

  // Normalise top to bit 9, take the smaller branch count and build the
  // 9-bit LPS table index {4 bits of top below its leading one, 5 bits of
  // the smaller count}.  zero = the smaller branch is empty.
  typedef struct packed {
    logic       zero;
    logic       lps_left;
    logic [8:0] idx;
  } lps_addr_t;

  function automatic lps_addr_t lps_address(input logic [CNT_W-1:0] cum0,
                                            input logic [CNT_W-1:0] cum1);
    lps_addr_t        a;
    logic [CNT_W-1:0] t, m, r, l;
    t = cum1;
    m = cum0;
    for (int i = 0; i < CNT_W - 1; i++) begin
      if (!t[CNT_W-1]) begin
        t = t << 1;
        m = m << 1;
      end
    end
    r = t - m;
    a.lps_left = (m < r);
    l = a.lps_left ? m : r;
    a.zero = (l == '0);
    a.idx  = {t[8:5], l[8:4]};
    return a;
  endfunction

  // Content of LPS table entry idx: the probability of the smaller branch
  // in 1/128 units, from the midpoints of the quantised counts, clamped to
  // 1..63 so that the larger branch always keeps at least half the range.
  function automatic logic [6:0] lps_entry(input logic [8:0] idx);
    int t_mid, l_mid, q;
    t_mid = 512 + 32 * int'(idx[8:5]) + 16;
    l_mid = 16 * int'(idx[4:0]) + 8;
    q = (l_mid * 128 + t_mid / 2) / t_mid;
    if (q < 1)  q = 1;
    if (q > 63) q = 63;
    return 7'(q);
  endfunction

  // One renormalisation step of the coder register: the carry out of the
  // low register and the k (1..7) bits shifted out, most significant first
  // in bits[6:7-k].  Tokens (COMMIT, ROLLBACK, END) travel with kind.
  typedef struct packed {
    ev_kind_t   kind;
    logic       carry;
    logic [2:0] k;
    logic [6:0] bits;
  } cb_op_t;

  // A finished piece of code: an optional head bit, a run of run_len equal
  // bits, then lit_n literal bits (lits[lit_n-1] first).
  localparam int RUN_W = 16;
  typedef struct packed {
    ev_kind_t         kind;
    logic             head_v;
    logic             head;
    logic             run_bit;
    logic [RUN_W-1:0] run_len;
    logic [2:0]       lit_n;
    logic [6:0]       lits;
  } code_item_t;

endpackage
