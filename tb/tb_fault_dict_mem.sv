// tb_fault_dict_mem: random bit-masked writes to the 32 x 12 response memory
// against a shadow copy, with reads (one cycle latency) checked every cycle.
module tb_fault_dict_mem;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we;
  logic [4:0] waddr, raddr;
  logic [11:0] wmask, wdata, rdata;
  logic [11:0] shadow [32];
  logic [11:0] exp_rd;

  fault_dict_mem #(.DEPTH(32), .WIDTH(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wmask = 0; wdata = 0;
    // fill every word with full-mask writes
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      we = 1; waddr = 5'(a); wmask = '1; wdata = 12'($urandom);
      shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we    = ($urandom % 2) == 0;
      waddr = 5'($urandom);
      wmask = 12'($urandom) & 12'($urandom);
      wdata = 12'($urandom);
      raddr = 5'($urandom);
      exp_rd = shadow[raddr];   // read sees the contents before this edge
      @(posedge clk);
      if (we)
        for (int b = 0; b < 12; b++)
          if (wmask[b]) shadow[waddr][b] = wdata[b];
      #1;
      checks++;
      if (rdata !== exp_rd) begin
        failures++;
        $display("FAIL read %0d: got %h expected %h", raddr, rdata, exp_rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
