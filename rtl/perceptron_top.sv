// perceptron_top: the perceptron accelerator, one learning core and four
// memory units.
//
//   mem_x1, mem_x2  the two input coordinates of each point (x512 fixed point)
//   mem_label       the class of each point, plain 0 or 1
//   mem_w           the weights w1, w2, b at addresses 0, 1, 2 (x512)
//
// Use: while the core is idle, a host writes points and initial weights
// through the host port (host_ena, host_w, host_sel, host_addr, host_din) and
// can read any memory back: a read shows on that memory's *_data_out one
// cycle later. Pulsing start with learn = 1 trains over num_samples points
// (one pass, weights kept in mem_w, so a second start continues from the
// learned weights); learn = 0 only predicts. At the end the final w1, w2, b
// come out one per cycle on w_data_out, marked by wout_valid / wout_idx,
// then done pulses. While busy is high the host port is ignored and the core
// owns all four memories.
//
// The five-module structure and the memory pins follow the document; the
// host port and its multiplexing are this design's own way of loading data.
module perceptron_top
  import perceptron_pkg::*;
#(
  parameter int unsigned DEPTH    = 2**ADDR_W,
  parameter int unsigned LR_SHIFT = 1
) (
  input  logic            clk,
  input  logic            rst,
  // host port
  input  logic            host_ena,
  input  logic            host_w,
  input  logic [1:0]      host_sel,     // 0: x1, 1: x2, 2: label, 3: weights
  input  addr_t           host_addr,
  input  word_t           host_din,
  // control
  input  logic            start,
  input  logic            learn,
  input  logic [ADDR_W:0] num_samples,
  output logic            busy,
  output logic            done,
  // memory outputs
  output word_t           x1_data_out,
  output word_t           x2_data_out,
  output word_t           label_data_out,
  output word_t           w_data_out,
  // per-point prediction
  output logic            pred_valid,
  output logic            pred,
  output logic            pred_label,
  output addr_t           pred_idx,
  // serial weight read-out marker (weight on w_data_out)
  output logic            wout_valid,
  output logic [1:0]      wout_idx
);

  localparam logic [1:0] SEL_X1 = 2'd0, SEL_X2 = 2'd1, SEL_LABEL = 2'd2, SEL_W = 2'd3;

  mem_req_t core_data_req, core_w_req;
  mem_req_t host_req;
  mem_req_t x1_req, x2_req, label_req, w_req;

  assign host_req = '{ena: host_ena, w: host_w, addr: host_addr, din: host_din};

  // The core owns the memories while busy; otherwise the host does.
  function automatic mem_req_t pick(input logic core_owns, input mem_req_t core_r,
                                    input logic sel_hit);
    mem_req_t r;
    if (core_owns) r = core_r;
    else begin
      r     = host_req;
      r.ena = host_req.ena && sel_hit;
    end
    return r;
  endfunction

  always_comb begin
    x1_req    = pick(busy, core_data_req, host_sel == SEL_X1);
    x2_req    = pick(busy, core_data_req, host_sel == SEL_X2);
    label_req = pick(busy, core_data_req, host_sel == SEL_LABEL);
    w_req     = pick(busy, core_w_req,    host_sel == SEL_W);
  end

  mem_unit #(.DEPTH(DEPTH)) u_mem_x1 (
    .clk, .rst, .ena(x1_req.ena), .w(x1_req.w), .addr(x1_req.addr),
    .din(x1_req.din), .dout(x1_data_out));

  mem_unit #(.DEPTH(DEPTH)) u_mem_x2 (
    .clk, .rst, .ena(x2_req.ena), .w(x2_req.w), .addr(x2_req.addr),
    .din(x2_req.din), .dout(x2_data_out));

  mem_unit #(.DEPTH(DEPTH)) u_mem_label (
    .clk, .rst, .ena(label_req.ena), .w(label_req.w), .addr(label_req.addr),
    .din(label_req.din), .dout(label_data_out));

  mem_unit #(.DEPTH(DEPTH)) u_mem_w (
    .clk, .rst, .ena(w_req.ena), .w(w_req.w), .addr(w_req.addr),
    .din(w_req.din), .dout(w_data_out));

  perceptron_core #(.LR_SHIFT(LR_SHIFT)) u_core (
    .clk, .rst,
    .start, .learn, .num_samples, .busy, .done,
    .data_req(core_data_req),
    .x1_q(x1_data_out), .x2_q(x2_data_out), .label_q(label_data_out),
    .w_req(core_w_req), .w_q(w_data_out),
    .pred_valid, .pred, .pred_label, .pred_idx,
    .wout_valid, .wout_idx);

endmodule
