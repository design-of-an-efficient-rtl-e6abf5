// tb_rrc_fig_runs: replays the two published simulation runs of the filter
// at default parameters: INTP_SEL = 4 and then 8, FLT_SEL = 0, with the
// input words 4521, 4359, 2593, 4012, each held until it has been captured.
// Every output is compared with rrc_model; the capture of each word is
// checked to come L clocks after the previous one. The first L outputs of
// each run depend only on the first word, 4521, and are also compared with
// the values printed for the published runs (factor 4: -85 -53 120 346;
// factor 8: -59 -82 -60 15 136 290 449 582), allowing 2 LSBs for
// coefficient rounding. Later published values depend on when that
// simulation changed its input and are not compared.
module tb_rrc_fig_runs
  import rrc_pkg::*;
  import rrc_ref_pkg::*;
;
  int checks = 0, failures = 0;

  logic               clk = 1'b0;
  logic               rst;
  sample_t            rrcin;
  logic [3:0]         intp_sel;
  logic               flt_sel;
  logic               in_strobe;
  logic signed [21:0] rrcout;

  rrc_filter dut (
    .clk(clk), .rst(rst), .rrcin(rrcin), .intp_sel(intp_sel),
    .flt_sel(flt_sel), .in_strobe(in_strobe), .rrcout(rrcout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rrc_model model = new();

  int published4 [4] = '{-85, -53, 120, 346};
  int published8 [8] = '{-59, -82, -60, 15, 136, 290, 449, 582};

  task automatic run(input logic [3:0] sel);
    sample_t words [4] = '{16'd4521, 16'd4359, 16'd2593, 16'd4012};
    int last_cap = -1;
    int outs [$];
    int first;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    model.reset();
    // each word is held until captured, then the next follows; 8 words
    // in all, then 60 clocks of zeros to drain the chain
    for (int w = 0; w < 8 + 60; w++) begin
      logic captured = 1'b0;
      while (!captured) begin
        logic want_strobe;
        checks++;
        if (rrcout != 22'(model.expected())) begin
          failures++;
          $display("FAIL L=%0d clk=%0d rrcout=%0d want %0d", sel, model.nclk, rrcout,
                   model.expected());
        end
        outs.push_back(int'(rrcout));
        if (w < 12) $write("%0d ", rrcout);
        intp_sel = sel;
        flt_sel  = 1'b0;
        rrcin    = (w < 8) ? words[w % 4] : 16'd0;
        want_strobe = model.apply(sel, 1'b0, rrcin);
        #1;
        checks++;
        if (in_strobe != want_strobe) begin
          failures++;
          $display("FAIL L=%0d in_strobe=%0d", sel, in_strobe);
        end
        if (in_strobe) begin
          captured = 1'b1;
          checks++;
          if (last_cap >= 0 && model.nclk - 1 - last_cap != int'(sel)) begin
            failures++;
            $display("FAIL L=%0d capture spacing %0d", sel, model.nclk - 1 - last_cap);
          end
          last_cap = model.nclk - 1;
        end
        @(negedge clk);
      end
    end
    $display("");
    // compare the start of the response with the published run
    first = 0;
    while (first < outs.size() && outs[first] == 0) first++;
    for (int i = 0; i < int'(sel); i++) begin
      int want = (sel == 4'd8) ? published8[i] : published4[i];
      int got  = (first + i < outs.size()) ? outs[first + i] : 0;
      checks++;
      if (got - want > 2 || want - got > 2) begin
        failures++;
        $display("FAIL L=%0d output %0d: %0d, published %0d", sel, i, got, want);
      end
    end
  endtask

  initial begin
    intp_sel = 4'd4;
    flt_sel  = 1'b0;
    rrcin    = '0;
    run(4'd4);
    run(4'd8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
