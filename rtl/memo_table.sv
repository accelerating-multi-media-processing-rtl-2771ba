// memo_table: the MEMO-TABLE, a small set-associative lookup table that
// remembers the operands and result of recent multi-cycle operations.
//
// Each entry holds a tag made of both full 64-bit operands (128 bits) and
// the one 64-bit result. A lookup hashes the operands into a set index
// (integer: XOR of the low index bits of both operands; floating point: XOR
// of the top index bits of both mantissas), compares the two operands of all
// ways of that set in parallel and returns the stored result on a match.
// For a commutative operation each way is also compared with the operands
// swapped; the XOR hash is symmetric, so both orders index the same set.
// On a miss the computation unit later writes its result in; the entry
// chosen is an invalid way if there is one, else the least recently used.
// A hit or a write makes the entry the most recently used.
//
// Timing: the lookup is combinational from lk_a/lk_b to lk_hit/lk_result
// (one cycle together with the register that the caller puts after it).
// Writes take effect at the clock edge. A lookup in the same cycle as a
// write sees the table as it was before the write (so it can still hit the
// entry being replaced) and also hits on the operands being written (write
// bypass), so a result entered in one cycle can be reused by the very next
// operation. When a hit and a write touch the same set in one cycle, only
// the write updates the recency order.
//
// From the method: 32 entries, 4 ways (8 sets), full operands as tag, XOR
// hashing, replacement of an entry on a miss, both operand orders compared
// for commutative operations. Choices of this design: true LRU replacement
// by per-way age counters, the write bypass, and clearing all entries on
// reset.
module memo_table
  import memo_pkg::*;
#(
  parameter int unsigned ENTRIES     = 32,
  parameter int unsigned WAYS        = 4,
  parameter op_e         OP          = OP_FDIV,
  parameter bit          COMMUTATIVE = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  // lookup
  input  logic            lk_valid,
  input  logic [XLEN-1:0] lk_a,
  input  logic [XLEN-1:0] lk_b,
  output logic            lk_hit,
  output logic [XLEN-1:0] lk_result,
  // update after a miss
  input  logic            wr_en,
  input  logic [XLEN-1:0] wr_a,
  input  logic [XLEN-1:0] wr_b,
  input  logic [XLEN-1:0] wr_result
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned AGE_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned HBITS = (SETS > 1) ? $clog2(SETS) : 0;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] a;
    logic [XLEN-1:0] b;
    logic [XLEN-1:0] result;
  } entry_t;

  entry_t           tbl [SETS][WAYS];
  logic [AGE_W-1:0] age [SETS][WAYS];   // 0 = most recently used

  initial begin
    assert (ENTRIES % WAYS == 0 && SETS > 0 && (SETS & (SETS - 1)) == 0)
      else $error("memo_table: ENTRIES/WAYS must be a power of two");
  end

  function automatic logic [IDX_W-1:0] set_of(input logic [XLEN-1:0] a,
                                              input logic [XLEN-1:0] b);
    logic [15:0] h;
    h = memo_hash(OP, a, b, HBITS);
    return h[IDX_W-1:0];
  endfunction

  function automatic logic match(input entry_t e,
                                 input logic [XLEN-1:0] a,
                                 input logic [XLEN-1:0] b);
    return e.valid && ((e.a == a && e.b == b) ||
                       (COMMUTATIVE && e.a == b && e.b == a));
  endfunction

  // ---------------- lookup ----------------
  logic [IDX_W-1:0] lk_set;
  logic             way_hit;
  logic [WAY_W-1:0] hit_way;
  logic             bypass_hit;

  always_comb begin
    lk_set    = (SETS > 1) ? set_of(lk_a, lk_b) : '0;
    way_hit   = 1'b0;
    hit_way   = '0;
    lk_result = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!way_hit && match(tbl[lk_set][w], lk_a, lk_b)) begin
        way_hit   = 1'b1;
        hit_way   = WAY_W'(w);
        lk_result = tbl[lk_set][w].result;
      end
    end
    bypass_hit = wr_en && ((wr_a == lk_a && wr_b == lk_b) ||
                           (COMMUTATIVE && wr_a == lk_b && wr_b == lk_a));
    if (bypass_hit && !way_hit) lk_result = wr_result;
    lk_hit = lk_valid && (way_hit || bypass_hit);
  end

  // ---------------- victim selection ----------------
  logic [IDX_W-1:0] wr_set;
  logic [WAY_W-1:0] victim;
  logic             found_invalid;

  always_comb begin
    wr_set        = (SETS > 1) ? set_of(wr_a, wr_b) : '0;
    victim        = '0;
    found_invalid = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (!found_invalid && !tbl[wr_set][w].valid) begin
        found_invalid = 1'b1;
        victim        = WAY_W'(w);
      end
    end
    if (!found_invalid) begin
      for (int unsigned w = 0; w < WAYS; w++) begin
        if (age[wr_set][w] == AGE_W'(WAYS - 1)) victim = WAY_W'(w);
      end
    end
  end

  // ---------------- state update ----------------
  // A write makes its new entry the most recently used of its set; a hit
  // does the same for the entry it found, unless a write goes to the same
  // set in that cycle.
  logic             lk_touch;
  logic             touch_s [SETS];
  logic [WAY_W-1:0] touch_w [SETS];

  always_comb begin
    lk_touch = lk_valid && way_hit && !(wr_en && wr_set == lk_set);
    for (int unsigned s = 0; s < SETS; s++) begin
      touch_s[s] = (wr_en && wr_set == IDX_W'(s)) || (lk_touch && lk_set == IDX_W'(s));
      touch_w[s] = (wr_en && wr_set == IDX_W'(s)) ? victim : hit_way;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          tbl[s][w] <= '0;
          age[s][w] <= AGE_W'(w);
        end
      end
    end else begin
      if (wr_en) begin
        tbl[wr_set][victim] <= '{valid: 1'b1, a: wr_a, b: wr_b, result: wr_result};
      end
      for (int unsigned s = 0; s < SETS; s++) begin
        if (touch_s[s]) begin
          for (int unsigned w = 0; w < WAYS; w++) begin
            if (WAY_W'(w) == touch_w[s])
              age[s][w] <= '0;
            else if (age[s][w] < age[s][touch_w[s]])
              age[s][w] <= age[s][w] + 1'b1;
          end
        end
      end
    end
  end

endmodule
