// perceptron_top_tb: end-to-end test of the perceptron accelerator at its
// default size (256-word memories, learning rate 1/2).
//
// The testbench generates a two-class data set of 700 points (x1, x2 drawn
// from [-8, 8), label 1 when x1 > x2, points closer than 1/4 to the line
// x1 = x2 dropped), splits it into 500 training and 200 test points, and
// works the accelerator only through its host port:
//   - load the initial weights and, batch by batch, the training points
//     (250 per batch, since one memory holds 256 words), and train for
//     several passes, continuing each time from the weights in mem-w;
//   - load the 200 test points and run in prediction-only mode, scoring
//     accuracy, precision, sensitivity and specificity;
//   - read memories back through the host port;
//   - try to write mem-w while the core is busy (must be ignored);
//   - run a pass over large values that saturates the weights;
//   - run one pass over all 256 words.
// An integer reference model replays every run; each prediction, each
// serially output weight, the cycle count and the weights left in mem-w are
// compared with it. Each mechanism is counted and must occur at least once.
module perceptron_top_tb;
  import perceptron_pkg::*;

  localparam int unsigned DEPTH    = 2**ADDR_W;
  localparam int unsigned LR_SHIFT = 1;   // the top's default
  localparam int N_TRAIN = 500, N_TEST = 200, BATCH = 250, EPOCHS = 6;

  logic clk = 1'b0;
  logic rst;
  logic host_ena, host_w;
  logic [1:0] host_sel;
  addr_t host_addr;
  word_t host_din;
  logic start, learn;
  logic [ADDR_W:0] num_samples;
  logic busy, done;
  word_t x1_data_out, x2_data_out, label_data_out, w_data_out;
  logic pred_valid, pred, pred_label;
  addr_t pred_idx;
  logic wout_valid;
  logic [1:0] wout_idx;

  perceptron_top dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- data set
  int dx1 [N_TRAIN + N_TEST], dx2 [N_TRAIN + N_TEST], dlab [N_TRAIN + N_TEST];
  int cur_x1 [DEPTH], cur_x2 [DEPTH], cur_lab [DEPTH];   // what the memories hold

  // ---------------------------------------------------------- reference model
  int checks = 0, failures = 0;
  int rw [3];
  int exp_pred [DEPTH];
  int n_pred, n_wout, n_correct;
  int tp, tn, fp, fn;
  // mechanism counters
  int m_update, m_no_update, m_sat, m_predict_run, m_learn_run, m_serial_out,
      m_host_load, m_host_read, m_host_blocked, m_full_depth;

  function automatic int sat16(input int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic model_run(input int n, input bit lrn);
    longint s;
    int y, e, nv;
    for (int i = 0; i < n; i++) begin
      s = longint'(rw[0]) * cur_x1[i] + longint'(rw[1]) * cur_x2[i] + longint'(rw[2]) * 512;
      y = (s >= 0) ? 1 : 0;
      exp_pred[i] = y;
      e = cur_lab[i] - y;
      if (!lrn) continue;
      if (e == 0) begin
        m_no_update++;
        continue;
      end
      m_update++;
      nv = rw[0] + e * (cur_x1[i] >>> LR_SHIFT);
      if (sat16(nv) != nv) m_sat++;
      rw[0] = sat16(nv);
      nv = rw[1] + e * (cur_x2[i] >>> LR_SHIFT);
      if (sat16(nv) != nv) m_sat++;
      rw[1] = sat16(nv);
      nv = rw[2] + e * (512 >>> LR_SHIFT);
      if (sat16(nv) != nv) m_sat++;
      rw[2] = sat16(nv);
    end
  endtask

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------------- monitors
  always @(posedge clk) begin
    if (!rst && pred_valid) begin
      check(int'(pred), exp_pred[pred_idx], "prediction");
      check(int'(pred_label), cur_lab[pred_idx], "label seen by the core");
      if (pred == pred_label) n_correct++;
      if ( pred &&  pred_label) tp++;
      if (!pred && !pred_label) tn++;
      if ( pred && !pred_label) fp++;
      if (!pred &&  pred_label) fn++;
      n_pred++;
    end
    if (!rst && wout_valid) begin
      check(int'(w_data_out), rw[wout_idx], "serial weight");
      check(int'(wout_idx), n_wout, "serial weight order");
      n_wout++;
      m_serial_out++;
    end
  end

  // ----------------------------------------------------------- host tasks
  task automatic host_write(input logic [1:0] sel, input int a, input int d);
    @(negedge clk);
    host_ena = 1'b1; host_w = 1'b1; host_sel = sel; host_addr = addr_t'(a); host_din = word_t'(d);
    @(negedge clk);
    host_ena = 1'b0; host_w = 1'b0;
  endtask

  task automatic host_read(input logic [1:0] sel, input int a, output int d);
    @(negedge clk);
    host_ena = 1'b1; host_w = 1'b0; host_sel = sel; host_addr = addr_t'(a);
    @(negedge clk);
    host_ena = 1'b0;
    unique case (sel)
      2'd0: d = int'(x1_data_out);
      2'd1: d = int'(x2_data_out);
      2'd2: d = int'(label_data_out);
      default: d = int'(w_data_out);
    endcase
    m_host_read++;
  endtask

  task automatic load_weights(input int w1, input int w2, input int b);
    host_write(2'd3, 0, w1);
    host_write(2'd3, 1, w2);
    host_write(2'd3, 2, b);
    rw[0] = w1; rw[1] = w2; rw[2] = b;
  endtask

  task automatic load_point(input int a, input int x1, input int x2, input int lab);
    host_write(2'd0, a, x1);
    host_write(2'd1, a, x2);
    host_write(2'd2, a, lab);
    cur_x1[a] = x1; cur_x2[a] = x2; cur_lab[a] = lab;
    m_host_load++;
  endtask

  // Start a run, optionally poke mem-w from the host while busy, wait for done.
  task automatic run(input int n, input bit lrn, input bit poke_while_busy);
    int cycles;
    model_run(n, lrn);
    n_pred = 0; n_wout = 0;
    @(negedge clk);
    start = 1'b1; learn = lrn; num_samples = (ADDR_W+1)'(n);
    @(posedge clk);
    #1 start = 1'b0;
    cycles = 0;
    while (!done) begin
      if (poke_while_busy && cycles == 5) begin
        host_ena = 1'b1; host_w = 1'b1; host_sel = 2'd3; host_addr = '0; host_din = 16'h7777;
      end else begin
        host_ena = 1'b0; host_w = 1'b0;
      end
      @(posedge clk); #1;
      cycles++;
    end
    host_ena = 1'b0; host_w = 1'b0;
    if (poke_while_busy) m_host_blocked++;
    if (lrn) m_learn_run++; else m_predict_run++;
    check(cycles, (lrn ? 7 : 4) * n + 4, "cycles start to done");
    check(n_pred, n, "predictions per run");
    check(n_wout, 3, "serial weights per run");
  endtask

  task automatic check_weight_mem();
    int d;
    for (int k = 0; k < 3; k++) begin
      host_read(2'd3, k, d);
      check(d, rw[k], "weight in mem-w");
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, i, a, b;
    rst = 1'b1; start = 1'b0; learn = 1'b0; num_samples = '0;
    host_ena = 1'b0; host_w = 1'b0; host_sel = '0; host_addr = '0; host_din = '0;
    {m_update, m_no_update, m_sat, m_predict_run, m_learn_run, m_serial_out} = '0;
    {m_host_load, m_host_read, m_host_blocked, m_full_depth} = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // data set: x in [-8, 8) scaled by 512, margin 1/4 around x1 = x2
    i = 0;
    while (i < N_TRAIN + N_TEST) begin
      a = int'($urandom_range(8191)) - 4096;
      b = int'($urandom_range(8191)) - 4096;
      if (a - b < 128 && b - a < 128) continue;
      dx1[i] = a; dx2[i] = b; dlab[i] = (a > b) ? 1 : 0;
      i++;
    end

    // ---- training: weights start at zero, batches of 250, several passes
    load_weights(0, 0, 0);
    for (int ep = 0; ep < EPOCHS; ep++) begin
      for (int bt = 0; bt < N_TRAIN / BATCH; bt++) begin
        for (int k = 0; k < BATCH; k++)
          load_point(k, dx1[bt*BATCH + k], dx2[bt*BATCH + k], dlab[bt*BATCH + k]);
        run(BATCH, 1'b1, ep == 0 && bt == 1);
        check_weight_mem();
      end
    end
    $display("learned w1=%0d/512 w2=%0d/512 b=%0d/512", rw[0], rw[1], rw[2]);

    // ---- test set, prediction only
    for (int k = 0; k < N_TEST; k++)
      load_point(k, dx1[N_TRAIN + k], dx2[N_TRAIN + k], dlab[N_TRAIN + k]);
    n_correct = 0; tp = 0; tn = 0; fp = 0; fn = 0;
    run(N_TEST, 1'b0, 1'b0);
    check_weight_mem();
    $display("test accuracy %0d/%0d, precision %0d/%0d, sensitivity %0d/%0d, specificity %0d/%0d",
             n_correct, N_TEST, tp, tp + fp, tp, tp + fn, tn, tn + fp);
    checks++;
    if (n_correct * 100 < 95 * N_TEST) begin
      failures++;
      $display("FAIL test accuracy below 95%%");
    end

    // ---- host read-back of the data memories
    for (int k = 0; k < 20; k++) begin
      a = int'($urandom_range(N_TEST - 1));
      host_read(2'd0, a, d); check(d, cur_x1[a], "x1 read-back");
      host_read(2'd1, a, d); check(d, cur_x2[a], "x2 read-back");
      host_read(2'd2, a, d); check(d, cur_lab[a], "label read-back");
    end

    // ---- large values drive the weights into saturation
    load_weights(32000, -32000, 0);
    load_point(0, 2000, 10000, 1);     // y = 0, label 1: w1 + 1000 passes 32767
    load_point(1, 9000, -3000, 0);     // y = 1, label 0: w2 + 1500 ok, w1 - 4500
    for (int k = 2; k < 40; k++)
      load_point(k, int'($urandom_range(30000)) - 15000, int'($urandom_range(30000)) - 15000,
                 int'($urandom_range(1)));
    run(40, 1'b1, 1'b0);
    check_weight_mem();

    // ---- one pass over every word of the memories
    load_weights(0, 0, 0);
    for (int k = 0; k < DEPTH; k++)
      load_point(k, dx1[k + 100], dx2[k + 100], dlab[k + 100]);
    run(DEPTH, 1'b1, 1'b0);
    m_full_depth++;
    check_weight_mem();

    // ---- every mechanism must have happened
    $display("updates %0d, no-update %0d, saturations %0d, learn runs %0d, predict runs %0d",
             m_update, m_no_update, m_sat, m_learn_run, m_predict_run);
    $display("serial weights %0d, host loads %0d, host reads %0d, host writes blocked %0d, full-depth runs %0d",
             m_serial_out, m_host_load, m_host_read, m_host_blocked, m_full_depth);
    check(int'(m_update > 0), 1, "weight update seen");
    check(int'(m_no_update > 0), 1, "correct point without update seen");
    check(int'(m_sat > 0), 1, "saturation seen");
    check(int'(m_predict_run > 0), 1, "prediction-only run seen");
    check(int'(m_learn_run > 0), 1, "learning run seen");
    check(int'(m_serial_out > 0), 1, "serial weight output seen");
    check(int'(m_host_load > 0), 1, "host load seen");
    check(int'(m_host_read > 0), 1, "host read seen");
    check(int'(m_host_blocked > 0), 1, "host write while busy seen");
    check(int'(m_full_depth > 0), 1, "full-depth run seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
