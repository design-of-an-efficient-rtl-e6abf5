// tb_data_generator: checks input sampling and sample-and-hold. After
// reset the capture strobe must come every L clocks starting with the
// first clock, up_data must hold the word last captured at the selected
// rate, and a change of INTP_SEL must switch rate and register at once.
// rrcin changes every clock so that a capture at the wrong edge shows.
module tb_data_generator
  import rrc_pkg::*;
  import rrc_ref_pkg::*;
;
  int checks = 0, failures = 0;
  int strobes [3];

  logic       clk = 1'b0;
  logic       rst;
  sample_t    rrcin;
  logic [3:0] intp_sel;
  logic       in_strobe;
  sample_t    up_data;

  data_generator dut (
    .clk(clk), .rst(rst), .rrcin(rrcin), .intp_sel(intp_sel),
    .in_strobe(in_strobe), .up_data(up_data)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] sels [4] = '{4'd4, 4'd6, 4'd8, 4'd4};
    int      n;          // index of the next rising edge since reset
    sample_t held [3];   // words last captured every 4, 6, 8 clocks
    int      l_now;
    rst      = 1'b1;
    rrcin    = '0;
    intp_sel = 4'd4;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    n = 0;
    foreach (held[i]) held[i] = '0;
    for (int seg = 0; seg < 8; seg++) begin
      intp_sel = sels[seg % 4];
      for (int c = 0; c < 120; c++) begin
        rrcin = 16'($urandom);
        l_now = ref_factor(intp_sel);
        #1;
        // up_data during this clock: last word captured at the selected rate
        checks++;
        if (up_data != held[l_now / 2 - 2]) begin
          failures++;
          $display("FAIL n=%0d L=%0d up_data=%0d want %0d", n, l_now, up_data,
                   held[l_now / 2 - 2]);
        end
        checks++;
        if (in_strobe != (n % l_now == 0)) begin
          failures++;
          $display("FAIL n=%0d L=%0d in_strobe=%0d", n, l_now, in_strobe);
        end
        if (in_strobe) strobes[l_now / 2 - 2]++;
        for (int i = 0; i < 3; i++)
          if (n % (4 + 2 * i) == 0) held[i] = rrcin;
        n++;
        @(negedge clk);
      end
    end
    foreach (strobes[i]) begin
      checks++;
      if (strobes[i] == 0) begin
        failures++;
        $display("FAIL rate %0d never sampled", 4 + 2 * i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
