// perceptron_core: trains a two-input perceptron over the points held in the
// data memories, keeping its weights in the weight memory (mem-w).
//
// For each point i = 0 .. num_samples-1 the core
//   1. reads w1, w2, b from mem-w (addresses 0, 1, 2) and x1[i], x2[i],
//      label[i] from the three data memories,
//   2. forms s = w1*x1 + w2*x2 + b with full-width products (16 x 16 -> 32
//      bits, summed in 34 bits) and the output y = 1 if s >= 0, else 0,
//   3. in learning mode writes back w_k + eta*(label - y)*x_k and
//      b + eta*(label - y), saturated to 16 bits.
// All of x, w and b are fixed point scaled by 512 (9 fraction bits); the label
// is the plain integer 0/1, so (label - y)*x is already on the weight scale.
// The bias term b is shifted left by 9 bits before the sum to match the
// 512*512 scale of the products. eta is 2**-LR_SHIFT.
// After the last point the core reads mem-w addresses 0, 1, 2 once more so
// that the final weights appear one after another on mem-w's data output,
// flagged by wout_valid / wout_idx, and then pulses done.
//
// Timing: start is sampled in IDLE. Each point takes 7 cycles in learning mode
// (3 reads, 1 compute, 3 writes) and 4 in prediction mode (learn = 0, no
// write-back). The weight read-out takes 4 cycles more, done follows it.
// pred_valid pulses one cycle after each compute with pred/pred_idx/pred_label.
//
// From the document: the read-compute-update-write loop through mem-w, the
// x512 scaling with an unscaled label, the sign activation, 32-bit products
// and the serial weight output after training. This design's own choices:
// the learning-rate shift, y = 1 for s = 0, saturation of the new weights,
// the weight addresses, the prediction-only mode and the handshake pins.
// data_req.w and data_req.din are constant zero: the core never writes the
// data memories, but the request keeps the memory unit's full pin set.
module perceptron_core
  import perceptron_pkg::*;
#(
  parameter int unsigned LR_SHIFT = 1   // learning rate eta = 2**-LR_SHIFT
) (
  input  logic           clk,
  input  logic           rst,
  // control
  input  logic           start,
  input  logic           learn,        // 1: train and write back, 0: predict only
  input  logic [ADDR_W:0] num_samples, // points to process, 0 .. 2**ADDR_W
  output logic           busy,
  output logic           done,         // one-cycle pulse at the end
  // data memories (x1, x2, label) share one read-only request
  output mem_req_t       data_req,
  input  word_t          x1_q,
  input  word_t          x2_q,
  input  word_t          label_q,
  // weight memory
  output mem_req_t       w_req,
  input  word_t          w_q,
  // per-point result
  output logic           pred_valid,
  output logic           pred,
  output logic           pred_label,
  output addr_t          pred_idx,
  // serial weight read-out: the weight itself is on mem-w's data output
  output logic           wout_valid,
  output logic [1:0]     wout_idx
);

  typedef enum logic [3:0] {
    S_IDLE, S_RD_W1, S_RD_W2, S_RD_B, S_CALC,
    S_WR_W1, S_WR_W2, S_WR_B, S_DUMP, S_FINISH
  } state_t;

  state_t state;
  logic [ADDR_W:0] idx;      // current point
  logic [ADDR_W:0] count;    // latched num_samples
  logic            learn_q;
  logic [1:0]      dump_cnt;
  word_t           w1, w2;   // weights captured from mem-w
  word_t           nw1, nw2, nb;  // updated weights

  // ---------------------------------------------------------------- compute
  // In S_CALC mem-w's output holds b and the data memories hold point idx.
  logic signed [PROD_W-1:0] p1, p2;
  logic signed [SUM_W-1:0]  s;
  logic                     y, lab;
  logic signed [DATA_W+1:0] d1, d2, db;   // signed step, one extra bit for saturation

  localparam logic signed [DATA_W+1:0] BIAS_STEP =
      (DATA_W+2)'(1 << FRAC_BITS) >>> LR_SHIFT;

  always_comb begin
    p1  = w1 * x1_q;
    p2  = w2 * x2_q;
    s   = SUM_W'(p1) + SUM_W'(p2) + (SUM_W'(w_q) <<< FRAC_BITS);
    y   = (s >= 0);
    lab = (label_q != '0);
    d1  = (DATA_W+2)'(x1_q) >>> LR_SHIFT;
    d2  = (DATA_W+2)'(x2_q) >>> LR_SHIFT;
    db  = BIAS_STEP;
    if (lab == y) begin
      d1 = '0;
      d2 = '0;
      db = '0;
    end else if (!lab) begin   // label 0, y 1: step down
      d1 = -d1;
      d2 = -d2;
      db = -db;
    end
  end

  // ------------------------------------------------------------ controller
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      idx        <= '0;
      count      <= '0;
      learn_q    <= 1'b0;
      dump_cnt   <= '0;
      w1         <= '0;
      w2         <= '0;
      nw1        <= '0;
      nw2        <= '0;
      nb         <= '0;
      done       <= 1'b0;
      pred_valid <= 1'b0;
      pred       <= 1'b0;
      pred_label <= 1'b0;
      pred_idx   <= '0;
      wout_valid <= 1'b0;
      wout_idx   <= '0;
    end else begin
      done       <= 1'b0;
      pred_valid <= 1'b0;
      wout_valid <= (state == S_DUMP);
      wout_idx   <= dump_cnt;
      unique case (state)
        S_IDLE: if (start) begin
          idx      <= '0;
          count    <= num_samples;
          learn_q  <= learn;
          dump_cnt <= '0;
          state    <= (num_samples == '0) ? S_DUMP : S_RD_W1;
        end
        S_RD_W1: state <= S_RD_W2;
        S_RD_W2: begin
          w1    <= w_q;
          state <= S_RD_B;
        end
        S_RD_B: begin
          w2    <= w_q;
          state <= S_CALC;
        end
        S_CALC: begin
          nw1        <= sat_word((DATA_W+2)'(w1)  + d1);
          nw2        <= sat_word((DATA_W+2)'(w2)  + d2);
          nb         <= sat_word((DATA_W+2)'(w_q) + db);
          pred_valid <= 1'b1;
          pred       <= y;
          pred_label <= lab;
          pred_idx   <= addr_t'(idx);
          if (learn_q) begin
            state <= S_WR_W1;
          end else begin
            idx   <= idx + 1'b1;
            state <= (idx + 1'b1 == count) ? S_DUMP : S_RD_W1;
          end
        end
        S_WR_W1: state <= S_WR_W2;
        S_WR_W2: state <= S_WR_B;
        S_WR_B: begin
          idx   <= idx + 1'b1;
          state <= (idx + 1'b1 == count) ? S_DUMP : S_RD_W1;
        end
        S_DUMP: begin
          dump_cnt <= dump_cnt + 1'b1;
          if (dump_cnt == 2'(NUM_WEIGHTS - 1)) state <= S_FINISH;
        end
        S_FINISH: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------- memory requests
  always_comb begin
    data_req = MEM_IDLE;
    w_req    = MEM_IDLE;
    unique case (state)
      S_RD_W1: begin
        data_req.ena  = 1'b1;
        data_req.addr = addr_t'(idx);
        w_req.ena     = 1'b1;
        w_req.addr    = W1_ADDR;
      end
      S_RD_W2: begin
        w_req.ena  = 1'b1;
        w_req.addr = W2_ADDR;
      end
      S_RD_B: begin
        w_req.ena  = 1'b1;
        w_req.addr = B_ADDR;
      end
      S_WR_W1: w_req = '{ena: 1'b1, w: 1'b1, addr: W1_ADDR, din: nw1};
      S_WR_W2: w_req = '{ena: 1'b1, w: 1'b1, addr: W2_ADDR, din: nw2};
      S_WR_B:  w_req = '{ena: 1'b1, w: 1'b1, addr: B_ADDR,  din: nb};
      S_DUMP: begin
        w_req.ena  = 1'b1;
        w_req.addr = addr_t'(dump_cnt);
      end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  // The core only ever reads the data memories.
  a_data_read_only: assert property (@(posedge clk) disable iff (rst)
      data_req.ena |-> !data_req.w);
  // Read-out addresses stay inside the weight block.
  a_dump_range: assert property (@(posedge clk) disable iff (rst)
      wout_valid |-> wout_idx < 2'(NUM_WEIGHTS));

endmodule
