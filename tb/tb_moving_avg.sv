// tb_moving_avg: self-checking test of the moving-average unit.
// Random (n, prev, new) operands, including the extremes, are applied; the
// result is compared with floor((n*prev + new) / (n + 1)) computed in 64-bit
// integers, and the start-to-done latency is checked to be W/BITS + 1 clocks.
module tb_moving_avg;
  localparam int W = 16;
  localparam int BITS = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] n;
  logic [W-1:0] prev, new_val, avg;
  logic busy, done;

  always #5 clk = ~clk;

  moving_avg #(.W(W), .N_W(16), .BITS(BITS)) dut (.clk, .rst_n, .start, .n, .prev, .new_val,
                                     .busy, .done, .avg);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [15:0] tn, input logic [W-1:0] tp, input logic [W-1:0] tw);
    longint unsigned expv;
    int lat;
    n = tn; prev = tp; new_val = tw;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    expv = (longint'(tn) * longint'(tp) + longint'(tw)) / (longint'(tn) + 1);
    checks++;
    if (avg !== W'(expv)) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d prev=%0d new=%0d got %0d exp %0d", tn, tp, tw, avg, expv);
    end
    checks++;
    if (lat != W / BITS + 1) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    n = 0; prev = 0; new_val = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 100, 200);
    run(1, 100, 200);
    run(16'hFFFF, 16'hFFFF, 16'hFFFF);
    run(16'hFFFF, 0, 16'hFFFF);
    run(3, 16'hFFFF, 0);
    for (int t = 0; t < 400; t++)
      run(16'($urandom_range(0, (t % 2) ? 20 : 65535)), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
