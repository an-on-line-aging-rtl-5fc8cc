// Look-up table of aged words.
//
// Each of the DEPTH rows holds a Valid bit, the address (row and column) of
// an aged word and a W/S bit giving its health level (0 weak, 1 strong).
// Every access looks its address up in all rows at once; a hit tells the
// controller which reduced reference to read the word with. The detection
// circuit's findings enter through the update port: a word already in the
// table can only move from weak to strong, a new word takes the lowest free
// row, and a new word that finds the table full is lost (upd_drop).
// The three fields and their meaning follow the original framework; the associative
// search, the lowest-free-row placement and the no-replacement policy are
// this design's choices. The default of 205 rows covers 20% of the 1024
// words of a 32K-bit array with 32-bit words.
//
// Timing: lookup is combinational on the registered table. An update is
// applied at the rising clock edge; upd_drop is valid in the same cycle as
// upd_en. Reset (active low, synchronous to clk) clears all Valid bits.
module aging_lut #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DEPTH  = 205,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              lk_hit,
  output logic              lk_ws,
  // update from the detection result
  input  logic              upd_en,
  input  logic [ADDR_W-1:0] upd_addr,
  input  logic              upd_ws,
  output logic              upd_drop,
  // status
  output logic [CNT_W-1:0]  count,
  output logic              full
);

  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] addr;
    logic              ws;
  } lut_row_t;

  lut_row_t rows [DEPTH];

  // Lookup
  always_comb begin
    lk_hit = 1'b0;
    lk_ws  = 1'b0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      if (rows[i].valid && rows[i].addr == lk_addr) begin
        lk_hit = 1'b1;
        lk_ws  = rows[i].ws;
      end
    end
  end

  // Update: matching row, else lowest free row.
  logic                     upd_hit, free_found;
  logic [$clog2(DEPTH)-1:0] upd_idx, free_idx;

  always_comb begin
    upd_hit    = 1'b0;
    upd_idx    = '0;
    free_found = 1'b0;
    free_idx   = '0;
    for (int i = int'(DEPTH) - 1; i >= 0; i--) begin
      if (rows[i].valid && rows[i].addr == upd_addr) begin
        upd_hit = 1'b1;
        upd_idx = i[$clog2(DEPTH)-1:0];
      end
      if (!rows[i].valid) begin
        free_found = 1'b1;
        free_idx   = i[$clog2(DEPTH)-1:0];
      end
    end
  end

  assign upd_drop = upd_en && !upd_hit && !free_found;
  assign full     = (count == CNT_W'(DEPTH));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) rows[i] <= '0;
      count <= '0;
    end else if (upd_en) begin
      if (upd_hit) begin
        rows[upd_idx].ws <= rows[upd_idx].ws | upd_ws;
      end else if (free_found) begin
        rows[free_idx] <= '{valid: 1'b1, addr: upd_addr, ws: upd_ws};
        count          <= count + 1'b1;
      end
    end
  end

  // The table never counts more rows than it has, and a dropped update
  // only happens when it is full.
  a_count: assert property (@(posedge clk) disable iff (!rst_n) count <= CNT_W'(DEPTH));
  a_drop_full: assert property (@(posedge clk) disable iff (!rst_n) upd_drop |-> full);

endmodule
