// cs_memory -- cos/sin result memory of the shared-datapath CORDIC.
//
// The single adder produces the new x and the new y of a micro-rotation in two
// successive cycles. This two-word memory collects them and releases them to the
// X and Y registers only as a pair, once both are stored, so the y update of a
// micro-rotation still sees the old x. Writes: `wr_en` with `wr_sel` = 0 stores the
// x word, with `wr_sel` = 1 the y word. The release happens on the edge that stores the
// y word of a pair whose x word is already held: `pair_valid` is then high and
// `pair_x`/`pair_y` carry the stored x and the incoming y, and the register bank loads
// them on that same edge. A y write without a pending x word releases nothing.
// `x_out`/`y_out` are the stored words, after the last micro-rotation the cos and
// sin results. Reset clears both words and the pending flag.
module cs_memory
  import cordic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr_en,
  input  logic   wr_sel,      // 0: x word, 1: y word
  input  coord_t wr_data,
  output logic   pair_valid,  // both words present: registers may load pair_x/pair_y
  output coord_t pair_x,
  output coord_t pair_y,
  output coord_t x_out,
  output coord_t y_out
);

  coord_t mem_x, mem_y;
  logic   x_held;             // x word of the current pair stored, y word not yet

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_x  <= '0;
      mem_y  <= '0;
      x_held <= 1'b0;
    end else if (wr_en) begin
      if (!wr_sel) begin
        mem_x  <= wr_data;
        x_held <= 1'b1;
      end else begin
        mem_y  <= wr_data;
        x_held <= 1'b0;
      end
    end
  end

  always_comb begin
    pair_valid = wr_en && wr_sel && x_held;
    pair_x     = mem_x;
    pair_y     = wr_data;
    x_out      = mem_x;
    y_out      = mem_y;
  end

endmodule
