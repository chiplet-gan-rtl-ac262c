// Activation computation unit of a PE: ReLU, normalisation, activation statistics,
// up-sampling and matrix reshape, working from the accumulation buffer into the activation
// SRAM.
//
// A command (start with op and its operands) makes the unit step through the elements of the
// operation, one element per cycle: it reads the accumulation buffer combinationally, computes,
// and writes the activation SRAM. The functions (ReLU, statistics, up-sampling, reshape) are
// the published ones; the command encoding, the element order and the arithmetic used are
// this design's choices:
//   OP_RELU     m elements: act[dst+i] = max(acc[src+i], 0)
//   OP_NORM     m elements: act[dst+i] = (acc[src+i] - a) * b, with a (mean) and b (1/sigma)
//               supplied by the command, i.e. the last step of normalisation
//   OP_STATS    m elements: sum += x, sq += x*x, the reduction statistics of a normalisation
//               (clear_stats first zeroes them); nothing is written
//   OP_UPSAMPLE m x n input, factor f: output (f*m) x (f*n) written row by row; nearest
//               neighbour copies the input element, zero insertion keeps it only at
//               (i%f == 0, j%f == 0) and writes 0 elsewhere
//   OP_RESHAPE  m x n input transposed into an n x m output
// stat_add adds a partial (sum, sq) pair received from another PE, the reduction across PEs.
// Timing: start in cycle t, element k processed in cycle t+1+k, done is a one-cycle pulse one
// cycle after the last element. start is ignored while busy.
module cg_act_unit
  import cg_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  opcode_e     op,
  input  logic [7:0]  src,
  input  logic [7:0]  dst,
  input  logic [7:0]  m,
  input  logic [7:0]  n,
  input  logic [7:0]  f,
  input  logic        zero_ins,
  input  logic        clear_stats,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [7:0]  acc_raddr,
  input  logic [31:0] acc_rdata,
  output logic        act_we,
  output logic [7:0]  act_waddr,
  output logic [31:0] act_wdata,
  input  logic        stat_add,
  input  logic [31:0] stat_add_sum,
  input  logic [31:0] stat_add_sq,
  output logic [31:0] stat_sum,
  output logic [31:0] stat_sq,
  output logic        busy,
  output logic        done
);
  opcode_e     op_q;
  logic [7:0]  src_q, dst_q, n_q, f_q;
  logic        zi_q;
  logic [31:0] a_q, b_q;
  logic [7:0]  i, j, i_lim, j_lim;     // outer / inner element counters
  logic [7:0]  ri, rf, cj, cf;         // up-sampling: input row, row phase, input column, column phase
  logic [7:0]  wptr;
  logic [31:0] x, relu_y, diff, norm_y, sq_x, sum_next, sq_next;
  logic [31:0] add_a, add_b, sq_add_b;

  always_comb begin
    unique case (op_q)
      OP_UPSAMPLE: acc_raddr = src_q + 8'(ri * n_q) + cj;
      OP_RESHAPE:  acc_raddr = src_q + 8'(j * n_q) + i;
      default:     acc_raddr = src_q + i;
    endcase
  end
  assign x      = acc_rdata;
  assign relu_y = x[31] ? 32'd0 : x;

  cg_fp_add u_sub  (.a(x), .b({~a_q[31], a_q[30:0]}), .y(diff));
  cg_fp_mul u_scl  (.a(diff), .b(b_q), .y(norm_y));
  cg_fp_mul u_sq   (.a(x), .b(x), .y(sq_x));
  // the statistics adders also serve the reduction of partial statistics from other PEs
  assign add_a    = busy ? x : stat_add_sum;
  assign sq_add_b = busy ? sq_x : stat_add_sq;
  assign add_b    = stat_sum;
  cg_fp_add u_sum  (.a(add_b), .b(add_a), .y(sum_next));
  cg_fp_add u_sqs  (.a(stat_sq), .b(sq_add_b), .y(sq_next));

  always_comb begin
    act_we    = busy && (op_q != OP_STATS);
    act_waddr = dst_q + wptr;
    unique case (op_q)
      OP_RELU:     act_wdata = relu_y;
      OP_NORM:     act_wdata = norm_y;
      OP_UPSAMPLE: act_wdata = (zi_q && (rf != 0 || cf != 0)) ? 32'd0 : x;
      default:     act_wdata = x;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      op_q <= OP_RELU; src_q <= '0; dst_q <= '0; n_q <= '0; f_q <= '0; zi_q <= 1'b0;
      a_q <= '0; b_q <= '0;
      i <= '0; j <= '0; i_lim <= '0; j_lim <= '0; ri <= '0; rf <= '0; cj <= '0; cf <= '0;
      wptr <= '0; stat_sum <= '0; stat_sq <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (stat_add) begin
          stat_sum <= sum_next;
          stat_sq  <= sq_next;
        end
        if (start) begin
          busy <= 1'b1;
          op_q <= op; src_q <= src; dst_q <= dst; n_q <= n; f_q <= f;
          zi_q <= zero_ins; a_q <= a; b_q <= b;
          i <= '0; j <= '0; ri <= '0; rf <= '0; cj <= '0; cf <= '0; wptr <= '0;
          unique case (op)
            OP_UPSAMPLE: begin i_lim <= 8'(f * m); j_lim <= 8'(f * n); end
            OP_RESHAPE:  begin i_lim <= n;         j_lim <= m;         end
            default:     begin i_lim <= m;         j_lim <= 8'd1;      end
          endcase
          if (op == OP_STATS && clear_stats) begin
            stat_sum <= '0;
            stat_sq  <= '0;
          end
        end
      end else begin
        if (op_q == OP_STATS) begin
          stat_sum <= sum_next;
          stat_sq  <= sq_next;
        end
        wptr <= wptr + 8'd1;
        // inner counter j, outer counter i; up-sampling phases follow them
        if (j + 8'd1 >= j_lim) begin
          j <= '0; cj <= '0; cf <= '0;
          if (rf + 8'd1 >= f_q) begin rf <= '0; ri <= ri + 8'd1; end
          else rf <= rf + 8'd1;
          if (i + 8'd1 >= i_lim) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
          i <= i + 8'd1;
        end else begin
          j <= j + 8'd1;
          if (cf + 8'd1 >= f_q) begin cf <= '0; cj <= cj + 8'd1; end
          else cf <= cf + 8'd1;
        end
      end
    end
  end
endmodule
