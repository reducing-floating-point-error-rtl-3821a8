// rp_accumulator: residue-preserving floating-point summation unit (top).
//
// Sums a stream of IEEE binary32 values X_i with the error-reducing
// recurrence
//     Step 1: R = S = 0                       (reset or clear)
//     Step 2: U = R + X_i                     (rounded; its residue is dropped)
//     Step 3: S = S + U,  R = residue of that rounded sum
// so the part of every addend that rounding would throw away is carried in
// R and fed back into the next addition. S and R are registers; one
// residue-preserving adder (rp_fp_adder) is shared by the two steps.
//
// Interface: X_i is taken on a rising clock edge when x_valid && x_ready.
// In that same cycle the adder does Step 2 and U is registered; in the next
// cycle (busy = 1, x_ready = 0) it does Step 3 and S, R are updated. So the
// unit takes one value every two cycles, and `sum`/`residue` reflect X_i two
// edges after it was accepted. `clear` (synchronous, wins over a transfer)
// and the active-low asynchronous reset perform Step 1. `count` is the
// number of values summed since then. The recurrence follows the source
// method; the sharing of one adder over two cycles, the handshake and clear
// are this design's choices. The final result of a summation is S; S + R is
// a closer value still, formed outside if wanted.
module rp_accumulator
  import fpadd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        x_valid,
  output logic        x_ready,
  input  fp32_t       x_data,
  output fp32_t       sum,
  output fp32_t       residue,
  output logic [31:0] count,
  output logic        busy
);

  typedef enum logic {ST_STEP2 = 1'b0, ST_STEP3 = 1'b1} state_e;

  state_e state;
  fp32_t  s_q, r_q, u_q;
  fp32_t  add_a, add_b, add_sum, add_res;

  assign x_ready = (state == ST_STEP2);
  assign busy    = (state == ST_STEP3);

  // Operand selection for the shared adder.
  always_comb begin
    if (state == ST_STEP2) begin
      add_a = r_q;
      add_b = x_data;
    end else begin
      add_a = s_q;
      add_b = u_q;
    end
  end

  rp_fp_adder u_add (.x(add_a), .y(add_b), .sum(add_sum), .residue(add_res));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_STEP2;
      s_q   <= '0;
      r_q   <= '0;
      u_q   <= '0;
      count <= '0;
    end else if (clear) begin
      state <= ST_STEP2;
      s_q   <= '0;
      r_q   <= '0;
      u_q   <= '0;
      count <= '0;
    end else begin
      unique case (state)
        ST_STEP2: if (x_valid) begin
          u_q   <= add_sum;
          state <= ST_STEP3;
        end
        ST_STEP3: begin
          s_q   <= add_sum;
          r_q   <= add_res;
          count <= count + 32'd1;
          state <= ST_STEP2;
        end
        default: state <= ST_STEP2;
      endcase
    end
  end

  assign sum     = s_q;
  assign residue = r_q;

  // A transfer can only start in Step 2.
  a_no_accept_busy: assert property (@(posedge clk) busy |-> !x_ready);

endmodule
