// Writes random words to the buffer and reads them back, checking the data
// and the one-cycle read latency.
module tb_sample_buffer;
  localparam int DEPTH = 256;
  logic clk = 0, we = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;
  sample_buffer #(.DEPTH(DEPTH), .W(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = 16'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      raddr = 8'($urandom);
      // overwrite a different address in the same cycle
      we = 1; waddr = raddr + 8'd1; wdata = 16'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++; $display("read %0d got %h exp %h", raddr, rdata, ref_mem[raddr]);
      end
      ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
