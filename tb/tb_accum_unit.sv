// tb_accum_unit: drives random tap products into the accumulation chain and
// checks, every clock, y(m) = sum_k tap_(m-1-k)[k] computed by direct
// convolution over the stored history of inputs. Also checks that reset
// clears the chain and that an impulse on tap k appears after k+1 clocks.
module tb_accum_unit
  import rrc_pkg::*;
;
  int checks = 0, failures = 0;

  logic                clk = 1'b0;
  logic                rst;
  prod_t               tap [MAX_TAPS];
  logic signed [21:0]  y;

  prod_t hist [$];  // flattened history: MAX_TAPS entries per clock

  accum_unit dut (.clk(clk), .rst(rst), .tap(tap), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected();
    int n = hist.size() / MAX_TAPS;  // clocks accumulated so far
    int s = 0;
    for (int k = 0; k < MAX_TAPS; k++)
      if (n - 1 - k >= 0) s += int'(hist[(n - 1 - k) * MAX_TAPS + k]);
    return s;
  endfunction

  initial begin
    rst = 1'b1;
    foreach (tap[k]) tap[k] = prod_t'($urandom);
    repeat (3) @(negedge clk);
    checks++;
    if (y != 0) begin
      failures++;
      $display("FAIL reset: y=%0d", y);
    end
    rst = 1'b0;
    // impulse on tap 10 only, then zeros: y must show it 11 clocks later
    foreach (tap[k]) tap[k] = '0;
    tap[10] = prod_t'(1234);
    @(negedge clk);
    foreach (tap[k]) tap[k] = '0;
    for (int c = 1; c <= 12; c++) begin
      checks++;
      if (y != ((c == 11) ? 22'sd1234 : 22'sd0)) begin
        failures++;
        $display("FAIL impulse c=%0d y=%0d", c, y);
      end
      @(negedge clk);
    end
    // random stream against direct convolution
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 1000; c++) begin
      foreach (tap[k]) begin
        tap[k] = prod_t'($urandom);
        hist.push_back(tap[k]);
      end
      @(negedge clk);
      checks++;
      if (y != 22'(expected())) begin
        failures++;
        $display("FAIL c=%0d y=%0d want %0d", c, y, expected());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
