// tb_li_relay: checks the latency-insensitive register pair.
// A producer offers a numbered sequence with random gaps and keeps each
// datum while stopped; a consumer stops at random. Checked: every datum
// arrives once and in order, stop rises only when the ancillary register
// holds a datum (registered, one cycle after the primary was stopped with
// a new datum arriving), a stop with an empty primary does not block, the
// reset preload appears first, and without stops one datum passes per cycle.
module tb_li_relay;
  logic clk = 0, rst_n = 1;
  logic in_valid, in_stop, out_valid, out_stop;
  logic [15:0] in_data, out_data;
  int checks = 0, failures = 0;
  int next_in, next_out;
  int stall_pct, gap_pct;
  bit saw_aux;

  li_relay #(.T(logic [15:0]), .RST_VALID(1'b1), .RST_DATA(16'hABCD)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    in_valid = 0; in_data = 0; out_stop = 0;
    next_in = 0; next_out = 0;
    #1 rst_n = 0;
    #1; check(out_valid && out_data == 16'hABCD && !in_stop, "reset preload");
    @(negedge clk) rst_n = 1;
    // preload is consumed first
    out_stop = 0;
    @(posedge clk); #1;
    check(!out_valid, "preload handed on");
    for (int phase = 0; phase < 3; phase++) begin
      stall_pct = (phase == 0) ? 0 : (phase == 1 ? 30 : 60);
      gap_pct   = (phase == 0) ? 0 : 25;
      for (int c = 0; c < 2000; c++) begin
        logic was_aux;
        @(negedge clk);
        if (!(in_valid && in_stop)) begin     // keep the datum while stopped
          in_valid = ($urandom_range(99) >= gap_pct);
          in_data  = 16'(next_in);
        end
        out_stop = ($urandom_range(99) < stall_pct);
        @(posedge clk);
        was_aux = in_stop;
        if (out_valid && !out_stop) begin
          check(out_data == 16'(next_out), $sformatf("out %0d expected %0d", out_data, next_out));
          next_out++;
        end
        if (in_valid && !in_stop) next_in++;
        #1;
        if (in_stop) saw_aux = 1;
        // stop means the ancillary register is in use: primary must be valid
        check(!in_stop || out_valid, "stop without a valid primary");
      end
      // drain
      in_valid = 0;
      @(negedge clk);
      in_valid = 0; out_stop = 0;
      repeat (3) begin
        @(posedge clk);
        if (out_valid && !out_stop) begin
          check(out_data == 16'(next_out), "drain order"); next_out++;
        end
      end
      check(next_in == next_out, $sformatf("phase %0d: sent %0d received %0d", phase, next_in, next_out));
    end
    check(saw_aux, "ancillary register never used");
    // throughput: 10 data in 10 consecutive cycles with no stop
    begin
      int got = 0;
      @(negedge clk);
      for (int c = 0; c < 12; c++) begin
        in_valid = (c < 10); in_data = 16'(next_in); out_stop = 0;
        @(posedge clk);
        if (in_valid && !in_stop) next_in++;
        if (out_valid) begin got++; next_out++; end
        @(negedge clk);
      end
      check(got == 10, $sformatf("throughput %0d of 10", got));
    end
    // a stopped primary with a new arrival raises stop one cycle later
    @(negedge clk); in_valid = 1; in_data = 16'(next_in); out_stop = 1;
    @(posedge clk); #1; check(!in_stop, "first datum enters primary");
    @(negedge clk); in_data = 16'(next_in + 1);
    @(posedge clk); #1; check(in_stop, "second datum goes to ancillary, stop raised");
    check(out_data == 16'(next_in), "primary kept while stopped");
    @(negedge clk); in_valid = 0; out_stop = 0;
    @(posedge clk); #1; check(!in_stop && out_data == 16'(next_in + 1), "ancillary moves up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
