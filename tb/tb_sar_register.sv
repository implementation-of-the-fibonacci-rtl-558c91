// tb_sar_register -- end-to-end test of the sequential approximation register
// at its default size (WIDTH = 8, ITR_W = 3).
//
// The testbench plays the outside controller: it steps itr through 0..7, one
// iteration per clock, and sets d from a comparison with a target value. It
// checks, cycle by cycle, that q equals a model run in the testbench (using a
// written out weight table), that every iteration takes exactly one clock,
// and that every target 0..255 converts to a value within one LSB. It also
// replays the two constant-d sequences (d held high gives 128, 192, 224, ...,
// 255; d held low gives 128, 64, ..., 1), an add and a subtract that wrap
// around the 8-bit range, and an asynchronous reset in the middle of a
// conversion. Each of these mechanisms is counted and must occur.
module tb_sar_register;

  localparam int unsigned WIDTH = 8;
  localparam int unsigned ITR_W = 3;

  logic             clk = 1'b0;
  logic             rst_n;
  logic [ITR_W-1:0] itr;
  logic             d;
  logic [WIDTH-1:0] q;

  int checks   = 0;
  int failures = 0;
  int n_load = 0, n_add = 0, n_sub = 0, n_wrap = 0, n_reset = 0, n_conv = 0;
  int unsigned model_q;

  int unsigned weight [8] = '{128, 64, 32, 16, 8, 4, 2, 1};

  sar_register dut (.clk(clk), .rst_n(rst_n), .itr(itr), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int unsigned expected);
    checks++;
    if (int'(q) != int'(expected)) begin
      failures++;
      if (failures < 20) $display("%s: q=%0d expected %0d", what, q, expected);
    end
  endtask

  // Present one iteration, clock it and check the result one edge later.
  task automatic step(int unsigned it, bit dd);
    int unsigned w = weight[it];
    int unsigned prev_q = model_q;
    itr = ITR_W'(it);
    d   = dd;
    @(posedge clk);
    #1;
    if (it == 0) begin
      model_q = w;
      n_load++;
    end else if (dd) begin
      model_q = (model_q + w) % 256;
      n_add++;
      if (model_q < prev_q) n_wrap++;
    end else begin
      model_q = (model_q + 256 - w) % 256;
      n_sub++;
      if (model_q > prev_q) n_wrap++;
    end
    check($sformatf("itr=%0d d=%0d", it, dd), model_q);
  endtask

  // A whole conversion: d = 1 while the target lies above q.
  task automatic convert(int unsigned target);
    int diff;
    step(0, 1'b0);
    for (int unsigned it = 1; it < WIDTH; it++) step(it, int'(q) < int'(target));
    diff = int'(q) - int'(target);
    checks++;
    if (diff > 1 || diff < -1) begin
      failures++;
      $display("target %0d converted to %0d", target, q);
    end
    n_conv++;
  endtask

  initial begin
    rst_n = 1'b0;
    itr   = '0;
    d     = 1'b0;
    model_q = 0;
    repeat (2) @(posedge clk);
    #1;
    check("after reset", 0);
    n_reset++;
    rst_n = 1'b1;

    // d held high: the output climbs 128, 192, 224, 240, 248, 252, 254, 255.
    for (int unsigned it = 0; it < WIDTH; it++) step(it, 1'b1);
    check("d high end", 255);
    // d held low: 128, 64, 32, 16, 8, 4, 2, 1.
    for (int unsigned it = 0; it < WIDTH; it++) step(it, 1'b0);
    check("d low end", 1);

    // Wrap-around: 255 + 64 and 1 - 64 leave the 8-bit range.
    for (int unsigned it = 0; it < WIDTH; it++) step(it, 1'b1);
    step(1, 1'b1);
    for (int unsigned it = 0; it < WIDTH; it++) step(it, 1'b0);
    step(1, 1'b0);

    // One iteration per clock: q changes on the very next edge.
    step(0, 1'b0);
    itr = ITR_W'(1);
    d   = 1'b1;
    @(negedge clk);
    check("no change before the edge", 128);
    @(posedge clk);
    #1;
    model_q = 192;
    check("one clock per iteration", 192);

    // Every target value.
    for (int unsigned t = 0; t < 256; t++) convert(t);

    // Asynchronous reset in the middle of a conversion.
    step(0, 1'b0);
    step(1, 1'b1);
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    model_q = 0;
    check("asynchronous reset", 0);
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    convert(77);

    $display("loads=%0d adds=%0d subtracts=%0d wraps=%0d resets=%0d conversions=%0d",
             n_load, n_add, n_sub, n_wrap, n_reset, n_conv);
    if (n_load == 0)  begin failures++; $display("no mid-scale load seen"); end
    if (n_add == 0)   begin failures++; $display("no add seen"); end
    if (n_sub == 0)   begin failures++; $display("no subtract seen"); end
    if (n_wrap == 0)  begin failures++; $display("no wrap-around seen"); end
    if (n_reset < 2)  begin failures++; $display("reset not exercised"); end
    if (n_conv == 0)  begin failures++; $display("no conversion seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
