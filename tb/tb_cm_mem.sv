// Self-checking testbench of cm_mem: random writes and reads over all four
// layers, compared with an array; a read returns its data one cycle later and
// a write does not disturb the read data register.
module tb_cm_mem;
  import cabac_pkg::*;
  logic clk = 0, we = 0, re = 0;
  logic [10:0] addr;
  ctx_t wdata, rdata;

  cm_mem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  ctx_t m [2048];
  bit   w [2048];
  initial begin
    foreach (w[i]) w[i] = 0;
    addr = 0; wdata = '0;
    for (int n = 0; n < 20000; n++) begin
      automatic int a = $urandom % 2048;
      @(negedge clk);
      we = ($urandom % 2) == 0 || !w[a];
      re = !we;
      addr = 11'(a);
      wdata = ctx_t'($urandom);
      @(posedge clk);
      if (we) begin m[a] = wdata; w[a] = 1; end
      #1;
      if (re) begin
        checks++;
        if (rdata != m[a]) begin failures++; $display("FAIL: address %0d", a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
