// mem_unit_tb: self-checking test of the single-port memory unit.
//
// Fills every address with random words, reads them back in random order
// against a reference array, and checks the read latency (data on dout one
// clock after the request), that dout holds while ena is low or during a
// write, that nothing is written while ena is low, and that reset clears dout.
module mem_unit_tb;
  import perceptron_pkg::*;

  localparam int unsigned DEPTH = 2**ADDR_W;

  logic  clk = 1'b0;
  logic  rst;
  logic  ena, w;
  addr_t addr;
  word_t din, dout;

  int checks = 0, failures = 0;
  word_t ref_mem [DEPTH];

  mem_unit dut (.clk, .rst, .ena, .w, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic access(input logic e, input logic wr, input addr_t a, input word_t d);
    @(negedge clk);
    ena = e; w = wr; addr = a; din = d;
    @(posedge clk);
    #1;
    ena = 1'b0;
  endtask

  initial begin
    word_t last;
    addr_t a;
    rst = 1'b1; ena = 1'b0; w = 1'b0; addr = '0; din = '0;
    repeat (2) @(posedge clk);
    #1 check(dout, '0, "dout after reset");
    rst = 1'b0;

    // fill every address
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = word_t'($urandom);
      access(1'b1, 1'b1, addr_t'(i), ref_mem[i]);
    end
    check(dout, '0, "dout unchanged by writes");

    // random reads: data is there right after the clock edge that took the request
    for (int i = 0; i < 600; i++) begin
      a = addr_t'($urandom);
      access(1'b1, 1'b0, a, word_t'($urandom));
      check(dout, ref_mem[a], "read data");
    end

    // a read does not show before the clock edge
    @(negedge clk);
    ena = 1'b1; w = 1'b0; addr = 8'd7; last = dout;
    #2 check(dout, last, "no combinational read");
    @(posedge clk); #1 ena = 1'b0;
    check(dout, ref_mem[7], "registered read");

    // ena low: neither write nor read
    last = dout;
    access(1'b0, 1'b1, 8'd9, ~ref_mem[9]);
    access(1'b0, 1'b0, 8'd11, '0);
    check(dout, last, "dout holds while disabled");
    access(1'b1, 1'b0, 8'd9, '0);
    check(dout, ref_mem[9], "no write while disabled");

    // a write does not disturb dout, then the new word reads back
    last = dout;
    ref_mem[20] = 16'h1234;
    access(1'b1, 1'b1, 8'd20, 16'h1234);
    check(dout, last, "dout holds during write");
    access(1'b1, 1'b0, 8'd20, '0);
    check(dout, 16'h1234, "read after write");

    // reset clears dout but keeps the array
    @(negedge clk) rst = 1'b1;
    @(posedge clk) #1 check(dout, '0, "dout cleared by reset");
    rst = 1'b0;
    access(1'b1, 1'b0, 8'd20, '0);
    check(dout, 16'h1234, "array kept through reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
