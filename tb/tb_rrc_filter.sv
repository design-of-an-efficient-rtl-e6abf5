// tb_rrc_filter: end-to-end test of the interpolation filter at its default
// parameters.
//
// rrc_model (rrc_ref_pkg) computes every output by direct convolution: the
// multipliers see the word last captured for the current factor (sample and
// hold), its products with the stored coefficients of the current setting
// form the tap vector of that clock, and rrcout after edge m is
// sum_k tap_(m-1-k)[k]. rrcin changes every clock, so a wrong capture edge
// shows. The run covers all six filter settings (factor 4, 6, 8 times
// roll-off 0.22, 0.35), switches of either setting while samples are in
// flight, invalid INTP_SEL values, impulses (first response one clock after
// capture) and reset in mid-stream. Each of these is counted and must
// happen at least once.
module tb_rrc_filter
  import rrc_pkg::*;
  import rrc_ref_pkg::*;
;
  int checks = 0, failures = 0;

  // mechanism counters
  int cfg_clocks [2][3];
  int intp_switches = 0, flt_switches = 0, inflight_switches = 0;
  int strobes = 0, negative_outputs = 0, impulses = 0, resets = 0;
  int invalid_sel_clocks = 0;

  logic                    clk = 1'b0;
  logic                    rst;
  sample_t                 rrcin;
  logic [3:0]              intp_sel;
  logic                    flt_sel;
  logic                    in_strobe;
  logic signed [21:0]      rrcout;

  rrc_filter dut (
    .clk(clk), .rst(rst), .rrcin(rrcin), .intp_sel(intp_sel),
    .flt_sel(flt_sel), .in_strobe(in_strobe), .rrcout(rrcout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rrc_model model = new();

  // One clock: check the output of the previous edge, apply new inputs for
  // the coming edge, extend the reference, check the strobe.
  task automatic step(input logic [3:0] sel, input logic f, input sample_t x);
    int   l;
    logic want_strobe;
    checks++;
    if (rrcout != 22'(model.expected())) begin
      failures++;
      $display("FAIL clk=%0d rrcout=%0d want %0d", model.nclk, rrcout, model.expected());
    end
    if (rrcout < 0) negative_outputs++;
    if (sel != intp_sel) begin
      intp_switches++;
      if (model.busy()) inflight_switches++;
    end
    if (f != flt_sel) begin
      flt_switches++;
      if (model.busy()) inflight_switches++;
    end
    intp_sel = sel;
    flt_sel  = f;
    rrcin    = x;
    l = ref_factor(sel);
    if (sel != 4'd4 && sel != 4'd6 && sel != 4'd8) invalid_sel_clocks++;
    cfg_clocks[f][l / 2 - 2]++;
    want_strobe = model.apply(sel, f, x);
    #1;
    checks++;
    if (in_strobe != want_strobe) begin
      failures++;
      $display("FAIL clk=%0d in_strobe=%0d L=%0d", model.nclk - 1, in_strobe, l);
    end
    if (in_strobe) strobes++;
    @(negedge clk);
  endtask

  task automatic do_reset();
    rst = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (rrcout != 0) begin
      failures++;
      $display("FAIL rrcout=%0d during reset", rrcout);
    end
    rst = 1'b0;
    model.reset();
    resets++;
  endtask

  // An impulse on a quiet filter: the first nonzero output must come one
  // clock after the capturing edge.
  task automatic impulse(input logic [3:0] sel, input logic f);
    int cap, first;
    for (int c = 0; c < 60; c++) step(sel, f, 16'd0);
    while (model.nclk % ref_factor(sel) != 0) step(sel, f, 16'd0);
    cap = model.nclk;
    step(sel, f, 16'd30000);
    first = -1;
    for (int c = 0; c < 60; c++) begin
      if (first < 0 && rrcout != 0) first = model.nclk - 1;
      step(sel, f, 16'd0);
    end
    checks++;
    if (first != cap + 1) begin
      failures++;
      $display("FAIL impulse captured at edge %0d, first output after edge %0d", cap, first);
    end
    impulses++;
  endtask

  initial begin
    logic [3:0] sels [3] = '{4'd4, 4'd6, 4'd8};
    rst = 1'b1;
    intp_sel = 4'd4;
    flt_sel  = 1'b0;
    rrcin    = '0;
    repeat (3) @(negedge clk);
    do_reset();

    // every setting with random data, switching while data is in flight
    for (int f = 0; f < 2; f++)
      foreach (sels[s])
        for (int c = 0; c < 300; c++) step(sels[s], 1'(f), 16'($urandom));

    // impulses for every setting
    for (int f = 0; f < 2; f++)
      foreach (sels[s]) impulse(sels[s], 1'(f));

    // random setting changes every few clocks, including invalid codes
    for (int c = 0; c < 1500; c++) begin
      automatic logic [3:0] sel = intp_sel;
      automatic logic       f   = flt_sel;
      if ($urandom % 40 == 0) sel = ($urandom % 8 == 0) ? 4'($urandom) : sels[$urandom % 3];
      if ($urandom % 60 == 0) f = ~f;
      step(sel, f, 16'($urandom));
    end

    // reset in mid-stream, then a full-scale input
    do_reset();
    for (int c = 0; c < 300; c++) step(4'd8, 1'b1, 16'hFFFF);
    for (int c = 0; c < 300; c++) step(4'd4, 1'b0, ($urandom % 2) ? 16'hFFFF : 16'h0000);

    // coverage of the mechanisms
    foreach (cfg_clocks[f, l]) begin
      checks++;
      if (cfg_clocks[f][l] == 0) begin
        failures++;
        $display("FAIL setting roll-off %0d factor %0d never run", f, 4 + 2 * l);
      end
    end
    checks++; if (intp_switches == 0)      begin failures++; $display("FAIL no INTP_SEL switch"); end
    checks++; if (flt_switches == 0)       begin failures++; $display("FAIL no FLT_SEL switch"); end
    checks++; if (inflight_switches == 0)  begin failures++; $display("FAIL no switch in flight"); end
    checks++; if (strobes == 0)            begin failures++; $display("FAIL no input sampled"); end
    checks++; if (negative_outputs == 0)   begin failures++; $display("FAIL no negative output"); end
    checks++; if (impulses == 0)           begin failures++; $display("FAIL no impulse"); end
    checks++; if (resets < 2)              begin failures++; $display("FAIL no mid-stream reset"); end
    checks++; if (invalid_sel_clocks == 0) begin failures++; $display("FAIL no invalid INTP_SEL"); end
    $display("settings run (clocks): b0.22 %0d/%0d/%0d  b0.35 %0d/%0d/%0d",
             cfg_clocks[0][0], cfg_clocks[0][1], cfg_clocks[0][2],
             cfg_clocks[1][0], cfg_clocks[1][1], cfg_clocks[1][2]);
    $display("switches intp=%0d flt=%0d in-flight=%0d strobes=%0d negative=%0d impulses=%0d resets=%0d invalid-sel clocks=%0d",
             intp_switches, flt_switches, inflight_switches, strobes, negative_outputs,
             impulses, resets, invalid_sel_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
