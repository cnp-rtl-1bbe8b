// valu: the vector arithmetic unit of the ConvNet processor.
//
// Every instruction works on streams: it reads input stream x (and, where
// needed, stream y) and writes stream z, taking one x sample per clock cycle
// whenever the streams allow, so an instruction's time depends only on the
// size of its input. Instructions (cnp_pkg::valu_op_e):
//   OP_CONV    z = pool( conv_KxK(x) + y )   y optional (cfg_use_y), pooling
//              P = 2**cfg_plog2 (1 = none); x is cfg_width x cfg_height.
//   OP_DOT     z = y + sum_k v[k] x^k         n = cfg_n interleaved planes
//   OP_NONLIN  z = g(x)                       piecewise-linear tanh
//   OP_SQRT    z = sqrt(x)
//   OP_PROD    z = x * y
//   OP_DIV     z = x / y
// For every op other than OP_CONV, cfg_len is the number of x samples.
// Coefficients are written by the CPU through wr_* (wr_sel selects the
// kernel, the dot-product vector or the non-linear segment table).
//
// Datapath control: the units present their result for the sample on x
// combinationally; the whole datapath advances ('step') when x is valid, the
// y sample the op needs (if any) is valid, and the output register is free
// or will be emptied this cycle if the step produces a result. z comes from
// a one-entry output register, so the first result appears one cycle after
// its last input. 'done' pulses once all cfg inputs are consumed and the
// output register has drained.
//
// The set of instructions and the convolver/pooling structure follow the
// CNP paper; the valid/ready streams, the number format (Q8.8) and the
// register interface are this design's choices.
module valu
  import cnp_pkg::*;
#(
  parameter int unsigned K     = 7,
  parameter int unsigned W_MAX = 640,
  parameter int unsigned N_MAX = 16,
  parameter int unsigned NSEG  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction
  input  logic        start,
  input  valu_op_e    op,
  input  logic [9:0]  cfg_width,
  input  logic [9:0]  cfg_height,
  input  logic [1:0]  cfg_plog2,
  input  logic        cfg_use_y,
  input  logic [$clog2(N_MAX):0] cfg_n,
  input  logic [21:0] cfg_len,
  output logic        busy,
  output logic        done,
  // coefficient writes
  input  logic        wr_en,
  input  wr_sel_e     wr_sel,
  input  logic [7:0]  wr_addr,
  input  logic [31:0] wr_data,
  // streams
  input  logic        x_valid,
  input  sample_t     x_data,
  output logic        x_ready,
  input  logic        y_valid,
  input  sample_t     y_data,
  output logic        y_ready,
  output logic        z_valid,
  output sample_t     z_data,
  input  logic        z_ready
);

  valu_op_e   op_q;
  logic [21:0] in_cnt;
  logic       in_done, last_x;
  logic       step, need_y, produce, out_free, can_go;

  // units
  logic       cv_valid, cv_last;
  acc_t       cv_acc, cv_acc_y;
  logic [9:0] cv_row, cv_col;
  logic       pl_emit;
  acc_t       pl_acc;
  logic       dt_valid;
  acc_t       dt_acc;
  sample_t    nl_y, sq_y, mu_y, dv_y;
  sample_t    result;

  conv2d #(.K(K), .W_MAX(W_MAX)) u_conv (
    .clk, .rst_n, .start,
    .cfg_width, .cfg_height,
    .kw_en   (wr_en && wr_sel == WR_KERNEL),
    .kw_addr (wr_addr[$clog2(K*K)-1:0]),
    .kw_data (wr_data[15:0]),
    .step    (step && op_q == OP_CONV),
    .x       (x_data),
    .o_valid (cv_valid),
    .o_acc   (cv_acc),
    .o_row   (cv_row),
    .o_col   (cv_col),
    .last_in (cv_last)
  );

  assign cv_acc_y = cv_acc + (cfg_use_y ? (acc_t'(y_data) <<< FRAC) : acc_t'(0));

  pool2d #(.W_MAX(W_MAX)) u_pool (
    .clk,
    .cfg_plog2,
    .cfg_ow   (cfg_width - 10'(K - 1)),
    .in_valid (cv_valid),
    .adv      (step && op_q == OP_CONV),
    .in_acc   (cv_acc_y),
    .in_row   (cv_row),
    .in_col   (cv_col),
    .emit     (pl_emit),
    .out_acc  (pl_acc)
  );

  dot_unit #(.N_MAX(N_MAX)) u_dot (
    .clk, .rst_n, .start,
    .cfg_n,
    .vw_en   (wr_en && wr_sel == WR_VECTOR),
    .vw_addr (wr_addr[$clog2(N_MAX)-1:0]),
    .vw_data (wr_data[15:0]),
    .step    (step && op_q == OP_DOT),
    .x       (x_data),
    .o_valid (dt_valid),
    .o_acc   (dt_acc)
  );

  nonlin #(.NSEG(NSEG)) u_nonlin (
    .clk,
    .tw_en   (wr_en && wr_sel == WR_NONLIN),
    .tw_addr (wr_addr[$clog2(NSEG)-1:0]),
    .tw_data (wr_data),
    .x       (x_data),
    .y       (nl_y)
  );

  valu_sqrt u_sqrt (.x(x_data), .y(sq_y));
  valu_mul  u_mul  (.a(x_data), .b(y_data), .p(mu_y));
  valu_div  u_div  (.a(x_data), .b(y_data), .q(dv_y));

  // ---- stream control ------------------------------------------------------
  always_comb begin
    unique case (op_q)
      OP_CONV: begin
        need_y  = cfg_use_y && cv_valid;
        produce = pl_emit;
        result  = sat_q88(pl_acc, 0);
        last_x  = cv_last;
      end
      OP_DOT: begin
        need_y  = cfg_use_y && dt_valid;
        produce = dt_valid;
        result  = sat_q88(dt_acc + (cfg_use_y ? (acc_t'(y_data) <<< FRAC) : acc_t'(0)), 0);
        last_x  = (in_cnt == cfg_len - 1);
      end
      OP_NONLIN, OP_SQRT: begin
        need_y  = 1'b0;
        produce = 1'b1;
        result  = (op_q == OP_NONLIN) ? nl_y : sq_y;
        last_x  = (in_cnt == cfg_len - 1);
      end
      default: begin   // OP_PROD, OP_DIV
        need_y  = 1'b1;
        produce = 1'b1;
        result  = (op_q == OP_PROD) ? mu_y : dv_y;
        last_x  = (in_cnt == cfg_len - 1);
      end
    endcase
  end

  assign out_free = !z_valid || z_ready;
  assign can_go   = busy && !in_done && (!need_y || y_valid) && (!produce || out_free);
  assign x_ready  = can_go;
  assign step     = can_go && x_valid;
  assign y_ready  = step && need_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      in_done <= 1'b0;
      in_cnt  <= '0;
      op_q    <= OP_CONV;
      z_valid <= 1'b0;
      z_data  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        in_done <= 1'b0;
        in_cnt  <= '0;
        op_q    <= op;
      end else begin
        if (step) begin
          in_cnt <= in_cnt + 1;
          if (last_x) in_done <= 1'b1;
        end
        if (busy && in_done && !z_valid) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
      if (step && produce) begin
        z_valid <= 1'b1;
        z_data  <= result;
      end else if (z_ready) begin
        z_valid <= 1'b0;
      end
    end
  end

  // stream rules
  assert property (@(posedge clk) disable iff (!rst_n) z_valid && !z_ready |=> z_valid && $stable(z_data))
    else $error("valu: z changed while stalled");
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("valu: start while busy");

endmodule
