// perceptron_core_tb: self-checking test of the perceptron learning core.
//
// The core is connected to four simple memory models (registered read, like
// the memory unit). An integer reference model in this testbench replays the
// perceptron rule on the same points: y = (w1*x1 + w2*x2 + 512*b >= 0),
// w += (label - y) * x / 2**LR_SHIFT, b += (label - y) * 512 / 2**LR_SHIFT,
// each weight saturated to 16 bits. Checked: every prediction, the serial
// weight read-out, the weight memory after each run and the cycle count
// (7 cycles per point when learning, 4 when only predicting, 4 more for the
// read-out). Runs: a small-valued training pass, a second pass continuing
// from the learned weights, a large-valued pass that drives the weights into
// saturation, a prediction-only pass and an empty pass (num_samples = 0).
module perceptron_core_tb;
  import perceptron_pkg::*;

  localparam int unsigned LR_SHIFT = 1;
  localparam int unsigned DEPTH    = 2**ADDR_W;

  logic clk = 1'b0;
  logic rst;
  logic start, learn;
  logic [ADDR_W:0] num_samples;
  logic busy, done;
  mem_req_t data_req, w_req;
  word_t x1_q, x2_q, label_q, w_q;
  logic pred_valid, pred, pred_label;
  addr_t pred_idx;
  logic wout_valid;
  logic [1:0] wout_idx;

  perceptron_core #(.LR_SHIFT(LR_SHIFT)) dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------- memory models
  word_t x1m [DEPTH], x2m [DEPTH], lm [DEPTH], wm [4];
  always_ff @(posedge clk) begin
    if (data_req.ena && !data_req.w) begin
      x1_q    <= x1m[data_req.addr];
      x2_q    <= x2m[data_req.addr];
      label_q <= lm[data_req.addr];
    end
    if (w_req.ena &&  w_req.w) wm[w_req.addr[1:0]] <= w_req.din;
    if (w_req.ena && !w_req.w) w_q <= wm[w_req.addr[1:0]];
  end

  // ------------------------------------------------------- reference model
  int checks = 0, failures = 0;
  int rw [3];                  // reference w1, w2, b
  int exp_pred [DEPTH];
  int exp_lab  [DEPTH];
  int n_pred, n_wout, sat_events, update_events;

  function automatic int sat16(input int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic model_run(input int n, input bit lrn);
    longint s;
    int y, lab, e, nv;
    for (int i = 0; i < n; i++) begin
      s   = longint'(rw[0]) * int'(x1m[i]) + longint'(rw[1]) * int'(x2m[i])
          + longint'(rw[2]) * 512;
      y   = (s >= 0) ? 1 : 0;
      lab = (lm[i] != 0) ? 1 : 0;
      exp_pred[i] = y;
      exp_lab[i]  = lab;
      e = lab - y;
      if (lrn && e != 0) begin
        update_events++;
        nv = rw[0] + e * (int'(x1m[i]) >>> LR_SHIFT);
        if (sat16(nv) != nv) sat_events++;
        rw[0] = sat16(nv);
        nv = rw[1] + e * (int'(x2m[i]) >>> LR_SHIFT);
        if (sat16(nv) != nv) sat_events++;
        rw[1] = sat16(nv);
        nv = rw[2] + e * (512 >>> LR_SHIFT);
        if (sat16(nv) != nv) sat_events++;
        rw[2] = sat16(nv);
      end
    end
  endtask

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------ output monitors
  always @(posedge clk) begin
    if (!rst && pred_valid) begin
      check(int'(pred), exp_pred[pred_idx], $sformatf("pred[%0d]", pred_idx));
      check(int'(pred_label), exp_lab[pred_idx], "pred_label");
      n_pred++;
    end
    if (!rst && wout_valid) begin
      check(int'(w_q), rw[wout_idx], $sformatf("serial weight %0d", wout_idx));
      check(int'(wout_idx), n_wout, "weight order");
      n_wout++;
    end
  end

  // -------------------------------------------------------------- stimulus
  task automatic run(input int n, input bit lrn);
    int cycles;
    model_run(n, lrn);
    n_pred = 0; n_wout = 0;
    @(negedge clk);
    start = 1'b1; learn = lrn; num_samples = (ADDR_W+1)'(n);
    @(posedge clk);
    #1 start = 1'b0;
    cycles = 0;
    while (!done) begin
      @(posedge clk); #1;
      cycles++;
    end
    check(cycles, (lrn ? 7 : 4) * n + 4, "cycles start to done");
    check(n_pred, n, "prediction count");
    check(n_wout, 3, "serial weight count");
    for (int k = 0; k < 3; k++) check(int'(wm[k]), rw[k], "weight memory");
    check(int'(busy), 0, "idle after done");
  endtask

  task automatic fill(input int n, input int range_lo, input int range_hi);
    for (int i = 0; i < n; i++) begin
      x1m[i] = word_t'(range_lo + int'($urandom_range(range_hi - range_lo)));
      x2m[i] = word_t'(range_lo + int'($urandom_range(range_hi - range_lo)));
      lm[i]  = (int'(x1m[i]) > int'(x2m[i])) ? 16'd1 : 16'd0;
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; start = 1'b0; learn = 1'b0; num_samples = '0;
    sat_events = 0; update_events = 0;
    wm[0] = 16'sd512; wm[1] = 16'sd512; wm[2] = -16'sd256; wm[3] = '0;
    rw[0] = 512; rw[1] = 512; rw[2] = -256;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // 1. training pass over 60 points in [-8, 8)
    fill(60, -4096, 4095);
    run(60, 1'b1);
    // 2. a second pass continues from the stored weights
    run(60, 1'b1);
    // 3. prediction only: weights must not move
    fill(40, -4096, 4095);
    run(40, 1'b0);
    // 4. empty pass: only the read-out
    run(0, 1'b1);
    // 5. large values push the weights against the 16-bit limits
    wm[0] = 16'sd32000; wm[1] = -16'sd32000; wm[2] = 16'sd0;
    rw[0] = 32000;      rw[1] = -32000;      rw[2] = 0;
    for (int i = 0; i < 30; i++) begin
      x1m[i] = word_t'(int'($urandom_range(30000)) - 15000);
      x2m[i] = word_t'(int'($urandom_range(30000)) - 15000);
      lm[i]  = 16'(($urandom_range(1)));
    end
    run(30, 1'b1);
    // 6. full memory depth
    fill(DEPTH, -4096, 4095);
    run(DEPTH, 1'b1);

    if (update_events == 0) begin
      failures++;
      $display("FAIL no weight update happened");
    end
    if (sat_events == 0) begin
      failures++;
      $display("FAIL no saturation happened");
    end
    $display("weight updates %0d, saturations %0d", update_events, sat_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
