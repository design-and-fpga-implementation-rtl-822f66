// tb_pri_cluster_ram: self-checking test of the PRI cluster memory.
// Random writes and reads on both ports each clock; every read result is
// compared, one clock after its address, with a model array (read returns the
// old word when the same address is written in that clock).
module tb_pri_cluster_ram;
  import rcda_pkg::*;
  localparam int AW = PRI_IDX_W;
  int checks = 0, failures = 0;

  logic clk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  pri_cluster_t wdata, rdata, expq;
  pri_cluster_t model [2**AW];
  bit   primed [2**AW];
  bit   exp_ok;

  always #5 clk = ~clk;

  pri_cluster_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0;
    exp_ok = 0;
    // fill every word first
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a);
      wdata = pri_cluster_t'({$urandom, $urandom, $urandom, $urandom});
      model[a] = wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (exp_ok) begin
        checks++;
        if (rdata !== expq) begin
          failures++;
          if (failures < 10) $display("FAIL read t=%0d", t);
        end
      end
      raddr = AW'($urandom);
      we    = $urandom_range(0, 1);
      waddr = (t % 5 == 0) ? raddr : AW'($urandom);
      wdata = pri_cluster_t'({$urandom, $urandom, $urandom, $urandom});
      expq  = model[raddr];
      exp_ok = 1;
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
