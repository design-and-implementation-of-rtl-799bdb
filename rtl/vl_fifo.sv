// vl_fifo: variable-length FIFO that synchronises the prediction path and
// the residual path, followed by the reconstruction adder.
//
// Prediction samples (from the intra predictor or motion compensator) and
// residuals (from the inverse transform) arrive four at a time, in the same
// order, but with unrelated timing: either path may run ahead, by up to a
// whole macroblock when the motion compensator works a macroblock at a time.
// One FIFO serves both directions: whenever a word arrives without its
// partner it is stored, and a tag remembers which path the FIFO currently
// holds. When the partner arrives later, the oldest stored word is popped
// and the two are added. Words arriving together while the FIFO is empty
// are added at once without touching the memory. Only the path that is
// ahead can be stalled (its ready drops when the FIFO is full).
//
// Reconstruction: out[i] = Clip1(pred[i] + res[i]), registered, so out_valid
// follows the matching arrival by one cycle. The event outputs pulse for a
// direct add (`ev_direct`) and for words stored from each side. `level`
// and `side_pred` tell a scheduler how many words are stored and whose.
module vl_fifo
  import vdec_pkg::*;
#(
  parameter int unsigned DEPTH = 96      // 4-sample words: one 4:2:0 macroblock
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  pred_valid,
  output logic  pred_ready,
  input  pix4_t pred,
  input  logic  res_valid,
  output logic  res_ready,
  input  res4_t res,
  output logic  out_valid,
  output pix4_t out_pix,
  output logic  ev_direct,
  output logic  ev_store_pred,
  output logic  ev_store_res,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic  side_pred                // stored words are predictions
);
  localparam int AW = $clog2(DEPTH);
  logic [95:0]  mem [DEPTH];             // {pred 32 bits, residual 64 bits}
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic          holds_pred;             // tag: which path the FIFO holds
  logic          pv, rv, push, pop;
  logic [95:0]   head, inword;
  pix4_t         p_sum;
  res4_t         r_sum;
  logic          full;

  assign full       = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign pred_ready = (count == '0) || !holds_pred || !full;
  assign res_ready  = (count == '0) ||  holds_pred || !full;
  assign pv         = pred_valid && pred_ready;
  assign rv         = res_valid && res_ready;
  assign head       = mem[rd_ptr];
  assign level      = count;
  assign side_pred  = holds_pred && (count != '0);

  always_comb begin
    push = 1'b0; pop = 1'b0;
    ev_direct = 1'b0; ev_store_pred = 1'b0; ev_store_res = 1'b0;
    inword = {pred[0], pred[1], pred[2], pred[3], res[0], res[1], res[2], res[3]};
    p_sum = pred;
    r_sum = res;
    if (count == '0) begin
      if (pv && rv)      ev_direct = 1'b1;
      else if (pv)       begin push = 1'b1; ev_store_pred = 1'b1; end
      else if (rv)       begin push = 1'b1; ev_store_res = 1'b1; end
    end else if (holds_pred) begin
      if (rv) begin
        pop = 1'b1;
        {p_sum[0], p_sum[1], p_sum[2], p_sum[3]} = head[95:64];
      end
      if (pv) begin push = 1'b1; ev_store_pred = 1'b1; end
    end else begin
      if (pv) begin
        pop = 1'b1;
        {r_sum[0], r_sum[1], r_sum[2], r_sum[3]} = head[63:0];
      end
      if (rv) begin push = 1'b1; ev_store_res = 1'b1; end
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= inword;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      count      <= '0;
      holds_pred <= 1'b0;
      out_valid  <= 1'b0;
      out_pix    <= '{default: '0};
    end else begin
      if (push) begin
        wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
        if (count == '0) holds_pred <= pv;
      end
      if (pop) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      out_valid <= ev_direct || pop;
      if (ev_direct || pop)
        for (int i = 0; i < 4; i++)
          out_pix[i] <= clip1(32'(signed'({1'b0, p_sum[i]})) + 32'(r_sum[i]));
    end
  end

endmodule
