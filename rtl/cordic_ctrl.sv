// cordic_ctrl -- sequencer of the shared-datapath CORDIC.
//
// A 3-bit up counter walks the four micro-rotations, two steps each: on an even count
// the datapath computes the new x (line select S = 1), on an odd count the new y
// (S = 0); the micro-rotation index is the upper two counter bits. A `start` seen
// while idle asserts `load` in that cycle (the X/Y registers, the angle register and
// the sign-bit register take their start values on that edge) and the eight steps
// follow on the next eight cycles, with `busy` high. `start` is ignored while busy.
// `done` is a one-cycle pulse in the cycle after the last step, when the result words
// are in the cos/sin memory: with start sampled on clock edge 0, done is high between edges 8 and 9.
// The schedule is fixed; an unused micro-rotation slot still takes its two cycles.
module cordic_ctrl
  import cordic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     load,    // take start values on this edge
  output logic     busy,    // a step is being computed in this cycle
  output logic     sel_x,   // S: 1 = x update step, 0 = y update step
  output rot_idx_t idx,     // micro-rotation of this step
  output logic     done
);

  typedef enum logic {IDLE, RUN} state_t;

  state_t     state_q;
  logic [2:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= IDLE;
      cnt_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        IDLE: if (start) begin
          state_q <= RUN;
          cnt_q   <= '0;
        end
        RUN: begin
          cnt_q <= cnt_q + 3'd1;
          if (cnt_q == 3'd7) begin
            state_q <= IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= IDLE;
      endcase
    end
  end

  always_comb begin
    load  = (state_q == IDLE) && start;
    busy  = (state_q == RUN);
    sel_x = ~cnt_q[0];
    idx   = rot_idx_t'(cnt_q[2:1]);
  end

endmodule
