// tb_survivor_memory: writes random 256-bit decision words to all 128 stages,
// reads them back in reverse order as the traceback does and checks each word
// arrives one clock after its address, against a copy kept in the testbench.
module tb_survivor_memory;
  localparam int W = 256, D = 128;
  logic clk = 0;
  always #5 clk = ~clk;
  logic                 we;
  logic [$clog2(D)-1:0] addr;
  logic [W-1:0]         wdata, rdata;
  logic [W-1:0]         model [D];
  int checks = 0, failures = 0;

  survivor_memory #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        we = 1; addr = a[$clog2(D)-1:0];
        for (int k = 0; k < W / 32; k++) wdata[k*32 +: 32] = $urandom;
        model[a] = wdata;
      end
      @(negedge clk) we = 0;
      for (int a = D - 1; a >= 0; a--) begin
        @(negedge clk) addr = a[$clog2(D)-1:0];
        @(posedge clk); #1;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL: stage %0d read back wrong", a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
