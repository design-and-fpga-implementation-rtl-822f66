// tb_pdw_fifo: self-checking test of the PDW input buffer.
// Random pushes and pops are checked against a queue model: order and data of
// every popped PDW, the valid and full flags, and the drop counter when PDWs
// arrive at a full buffer (including push and pop in the same clock).
module tb_pdw_fifo;
  import rcda_pkg::*;
  localparam int DEPTH = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid = 0, out_pop = 0, out_valid, full;
  pdw_t in_pdw, out_pdw;
  logic [15:0] dropped;
  pdw_t model [$];
  int   drops = 0;
  bit   pop_ok, push_ok;

  always #5 clk = ~clk;

  pdw_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .clear, .in_valid, .in_pdw,
                                 .out_valid, .out_pdw, .out_pop, .dropped, .full);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_pdw = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // compare outputs with the model
      checks++;
      if (out_valid !== (model.size() != 0) || full !== (model.size() == DEPTH)) begin
        failures++;
        if (failures < 10) $display("FAIL flags t=%0d valid=%0b full=%0b size=%0d", t, out_valid, full, model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (out_pdw !== model[0]) begin
          failures++;
          if (failures < 10) $display("FAIL data t=%0d", t);
        end
      end
      checks++;
      if (dropped !== 16'(drops)) begin
        failures++;
        if (failures < 10) $display("FAIL dropped %0d exp %0d", dropped, drops);
      end
      // next stimulus; bias toward filling in the first half
      in_valid = ($urandom_range(0, 99) < ((t < 2000) ? 70 : 40));
      out_pop  = ($urandom_range(0, 99) < ((t < 2000) ? 40 : 70));
      in_pdw   = '{freq: 16'($urandom), pw: 16'($urandom), pa: 16'($urandom), toa: $urandom};
      // model update at the coming edge
      begin
        pop_ok  = out_pop && model.size() != 0;
        push_ok = in_valid && (model.size() < DEPTH || pop_ok);
        if (pop_ok) void'(model.pop_front());
        if (push_ok) model.push_back(in_pdw);
        if (in_valid && !push_ok) drops++;
      end
    end
    checks++;
    if (drops == 0) begin
      failures++;
      $display("FAIL overflow never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
