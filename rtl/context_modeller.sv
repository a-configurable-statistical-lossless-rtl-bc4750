// context_modeller -- finds the contexts of each input byte in a hashed
// context tree held in SRAM, and extends the tree when a context is new.
//
// The last MAX_ORDER bytes sit in the context value FIFO (hist[1] is the
// byte just before the current one).  The context of order k is the path
// root -> hist[1] -> ... -> hist[k].  Each tree node is a word of the tree
// memory: {context area, prefix area (the parent's context area), symbol}.
// The node for (prefix, symbol) is looked for at index
//   ((symbol << HASH_SHIFT) XOR prefix) + p*PROBE_INC   (mod NODES)
// for probe p = 0..SEARCH_LIMIT-1.  A node matches when it is busy and its
// prefix and symbol are the wanted ones; a match emits its context area and
// the search goes on one order higher.  A free node ends the search: it is
// claimed for the missing context and given the next unused context area,
// which is emitted marked fresh (its probability data is stale).  The
// search also ends at the run-time maximum order, after SEARCH_LIMIT
// failed probes, or when no context area is left.  Order 0 is the root,
// context area 0, and needs no search.
//
// An end-of-block word (in_eob) searches the contexts of the position after
// the last byte, for the termination sequence, and then frees the whole
// tree in one cycle (area_free_map.clear) and forgets the history.
//
// Interface: bytes arrive on in_valid/in_ready.  Context areas leave on
// push_* (lowest order first, at most one per cycle), and fin closes the
// record of one byte with its symbol and eob flag.  A byte is taken only
// when the double buffer has a free bank (buf_ready).  Timing: 2 cycles
// for the root, 2 cycles per probe, 1 cycle to close.
//
// The tree organisation, the search limit of 10, the 1312-node tree for
// 1024 areas and the single-cycle reset follow the source design.  The
// hash shift, the probe step and the rule that a new context is emitted as
// the highest order are this design's reading of it.
module context_modeller
  import ppmh_pkg::*;
#(
  parameter int CONTEXTS = 1024,
  parameter int LINES    = 41,
  localparam int CA_W    = $clog2(CONTEXTS),
  localparam int NODES   = LINES * 32,
  localparam int IW      = $clog2(NODES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ORD_W-1:0] max_order,   // run-time maximum model order, 0..MAX_ORDER
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [SYM_W-1:0] in_data,
  input  logic             in_eob,
  input  logic             buf_ready,
  output logic             push_valid,
  output logic [CA_W-1:0]  push_ca,
  output logic             push_fresh,
  output logic             fin,
  output logic [SYM_W-1:0] fin_sym,
  output logic             fin_term
);

  typedef struct packed {
    logic [CA_W-1:0]  ca;
    logic [CA_W-1:0]  prefix;
    logic [SYM_W-1:0] sym;
  } tnode_t;

  typedef enum logic [1:0] {S_IDLE, S_RD, S_CMP, S_FIN} state_t;

  state_t           state;
  logic [SYM_W-1:0] hist [1:MAX_ORDER];
  logic [ORD_W-1:0] nseen, k, lim;
  logic [SYM_W-1:0] cur_sym;
  logic             cur_eob;
  logic [CA_W-1:0]  prev_ca;
  logic [CA_W:0]    next_area;
  logic             root_used;
  logic [IW-1:0]    idx;
  logic [$clog2(SEARCH_LIMIT+1)-1:0] probe;

  tnode_t           rd_node, wr_node;
  logic             busy, take, match, can_alloc, mark, clear;
  logic [IW-1:0]    idx_next;

  function automatic logic [IW-1:0] hash(input logic [SYM_W-1:0] s, input logic [CA_W-1:0] pre);
    logic [CA_W-1:0] h;
    h = CA_W'({s, {HASH_SHIFT{1'b0}}}) ^ pre;
    return IW'(32'(h) % NODES);
  endfunction

  sync_ram #(.DEPTH(NODES), .WIDTH($bits(tnode_t))) u_tree (
    .clk   (clk),
    .re    (state == S_RD),
    .raddr (idx),
    .rdata (rd_node),
    .we    (mark),
    .waddr (idx),
    .wdata (wr_node)
  );

  area_free_map #(.LINES(LINES)) u_free (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (clear),
    .re    (state == S_RD),
    .raddr (idx),
    .busy  (busy),
    .mark  (mark),
    .maddr (idx)
  );

  assign take      = (state == S_IDLE) && in_valid && buf_ready;
  assign in_ready  = (state == S_IDLE) && buf_ready;
  assign lim       = (max_order < nseen) ? max_order : nseen;
  assign match     = busy && (rd_node.prefix == prev_ca) && (rd_node.sym == hist[k]);
  assign can_alloc = next_area < (CA_W+1)'(CONTEXTS);
  assign mark      = (state == S_CMP) && !busy && can_alloc;
  assign wr_node   = '{ca: next_area[CA_W-1:0], prefix: prev_ca, sym: hist[k]};
  assign idx_next  = (32'(idx) + PROBE_INC >= NODES) ? IW'(32'(idx) + PROBE_INC - NODES)
                                                     : IW'(32'(idx) + PROBE_INC);
  assign clear     = (state == S_FIN) && cur_eob;

  always_comb begin
    push_valid = 1'b0;
    push_ca    = '0;
    push_fresh = 1'b0;
    if (take) begin
      push_valid = 1'b1;
      push_fresh = !root_used;
    end else if (state == S_CMP) begin
      if (match) begin
        push_valid = 1'b1;
        push_ca    = rd_node.ca;
      end else if (mark) begin
        push_valid = 1'b1;
        push_ca    = next_area[CA_W-1:0];
        push_fresh = 1'b1;
      end
    end
  end

  assign fin      = (state == S_FIN);
  assign fin_sym  = cur_sym;
  assign fin_term = cur_eob;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      nseen     <= '0;
      k         <= '0;
      cur_sym   <= '0;
      cur_eob   <= 1'b0;
      prev_ca   <= '0;
      next_area <= (CA_W+1)'(1);
      root_used <= 1'b0;
      idx       <= '0;
      probe     <= '0;
      for (int i = 1; i <= MAX_ORDER; i++) hist[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (take) begin
          cur_sym   <= in_data;
          cur_eob   <= in_eob;
          root_used <= 1'b1;
          prev_ca   <= '0;
          k         <= ORD_W'(1);
          probe     <= '0;
          idx       <= hash(hist[1], '0);
          state     <= (lim != '0) ? S_RD : S_FIN;
        end
        S_RD: state <= S_CMP;
        S_CMP: begin
          if (match) begin
            prev_ca <= rd_node.ca;
            k       <= k + 1'b1;
            probe   <= '0;
            if (32'(k) < MAX_ORDER) idx <= hash(hist[k+1], rd_node.ca);
            state   <= (k >= lim) ? S_FIN : S_RD;
          end else if (!busy) begin
            if (can_alloc) next_area <= next_area + 1'b1;
            state <= S_FIN;
          end else begin
            probe <= probe + 1'b1;
            idx   <= idx_next;
            state <= (32'(probe) + 1 >= SEARCH_LIMIT) ? S_FIN : S_RD;
          end
        end
        S_FIN: begin
          state <= S_IDLE;
          if (cur_eob) begin
            nseen     <= '0;
            next_area <= (CA_W+1)'(1);
            root_used <= 1'b0;
            for (int i = 1; i <= MAX_ORDER; i++) hist[i] <= '0;
          end else begin
            hist[1] <= cur_sym;
            for (int i = 2; i <= MAX_ORDER; i++) hist[i] <= hist[i-1];
            if (32'(nseen) < MAX_ORDER) nseen <= nseen + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
