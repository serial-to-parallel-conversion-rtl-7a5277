// tb_serializing_counter: checks the non-carry pulse trains of an 8-stage
// serializing counter.  For every input pulse the expected firing stage is
// the position of the lowest 0 bit of a reference count kept by the bench
// (none when the count is all ones); over each 256-pulse cycle stage i must
// fire 2^(7-i) times.  Input pulses arrive with random gaps.
module tb_serializing_counter;
  localparam int N = 8;
  logic clk = 0, rst = 1, pulse_in = 0;
  logic [N-1:0] nc;
  int checks = 0, failures = 0;
  int ref_cnt = 0;
  int tally [N];

  serializing_counter #(.N(N)) dut (.clk, .rst, .pulse_in, .nc);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] expect_nc(int c, logic p);
    logic [N-1:0] e = '0;
    if (p) for (int i = 0; i < N; i++) if (((c >> i) & 1) == 0) begin e[i] = 1'b1; break; end
    return e;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (tally[i]) tally[i] = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3 * (1 << N); ) begin
      pulse_in <= ($urandom_range(0, 2) != 0);
      @(negedge clk);
      checks++;
      if (nc !== expect_nc(ref_cnt, pulse_in)) begin
        failures++;
        if (failures < 10) $display("FAIL cnt=%0d p=%0b nc=%b", ref_cnt, pulse_in, nc);
      end
      for (int i = 0; i < N; i++) if (nc[i]) tally[i]++;
      if (pulse_in) begin
        ref_cnt = (ref_cnt + 1) % (1 << N);
        n++;
        if (ref_cnt == 0) begin
          for (int i = 0; i < N; i++) begin
            checks++;
            if (tally[i] != (1 << (N - 1 - i))) begin
              failures++;
              $display("FAIL stage %0d fired %0d times per cycle", i, tally[i]);
            end
            tally[i] = 0;
          end
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
