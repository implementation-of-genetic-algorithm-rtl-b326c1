// tb_ga_memory: checks the shared memory.
//
// Writes random words to every address in random order, then reads them all
// back and compares with a copy kept by the testbench; reads are
// asynchronous, so data must follow the address in the same cycle. A write
// with we low must change nothing.
module tb_ga_memory;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [64];
  int checks = 0, failures = 0;

  ga_memory dut (.clk, .we, .addr, .wdata, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); we = 1; addr = 6'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom_range(63);
      @(negedge clk); we = 1; addr = 6'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0; addr = 6'd5; wdata = ~model[5];
    @(negedge clk);
    for (int a = 0; a < 64; a++) begin
      addr = 6'(a);
      #1 check(rdata == model[a], $sformatf("addr %0d read %h expected %h", a, rdata, model[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
