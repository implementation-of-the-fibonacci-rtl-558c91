// tb_sar_logic -- exhaustive self-checking test of the SAR next-value logic.
//
// For the default 8-bit instance every combination of itr (0..7), d and q
// (0..255) is applied and q_next is compared with a model that uses a written
// out table of weights, 128, 64, ..., 1, rather than any shift. A second
// instance with WIDTH = 5 (ITR_W = 3) checks a width that is not a power of
// two, including the hold on the unused iteration codes 5..7.
module tb_sar_logic;

  localparam int unsigned W8 = 8;
  localparam int unsigned W5 = 5;

  logic [2:0]    itr;
  logic          d;
  logic [W8-1:0] q8, qn8;
  logic [W5-1:0] q5, qn5;

  int checks   = 0;
  int failures = 0;

  // Weights of the 8-bit register, as listed for iterations 0..7.
  int unsigned weight8 [8] = '{128, 64, 32, 16, 8, 4, 2, 1};
  int unsigned weight5 [5] = '{16, 8, 4, 2, 1};

  sar_logic #(.WIDTH(W8), .ITR_W(3)) dut8 (.itr(itr), .d(d), .q(q8), .q_next(qn8));
  sar_logic #(.WIDTH(W5), .ITR_W(3)) dut5 (.itr(itr), .d(d), .q(q5), .q_next(qn5));

  function automatic int unsigned model(int unsigned width, int unsigned it,
                                        bit dd, int unsigned qq);
    int unsigned w;
    int unsigned m = (1 << width);
    if (it >= width) return qq;
    w = (width == 8) ? weight8[it] : weight5[it];
    if (it == 0) return w;
    if (dd) return (qq + w) % m;
    return (qq + m - w) % m;
  endfunction

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 8; it++) begin
      for (int dd = 0; dd < 2; dd++) begin
        for (int qq = 0; qq < 256; qq++) begin
          itr = 3'(it);
          d   = dd[0];
          q8  = 8'(qq);
          q5  = 5'(qq);
          #1;
          checks++;
          if (int'(qn8) != int'(model(W8, it, dd[0], qq))) begin
            failures++;
            if (failures < 10)
              $display("W8 itr=%0d d=%0d q=%0d: got %0d expected %0d",
                       it, dd, qq, qn8, model(W8, it, dd[0], qq));
          end
          if (qq < 32) begin
            checks++;
            if (int'(qn5) != int'(model(W5, it, dd[0], qq))) begin
              failures++;
              if (failures < 10)
                $display("W5 itr=%0d d=%0d q=%0d: got %0d expected %0d",
                         it, dd, qq, qn5, model(W5, it, dd[0], qq));
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
