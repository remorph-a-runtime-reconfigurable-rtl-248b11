// tb_instr_mem: writes random 72-bit words to every location of the instruction
// memory, reads them back in a shuffled order and checks the one-cycle read
// latency (the word for raddr appears after exactly one clock edge).
module tb_instr_mem;
  localparam int DEPTH = 512;
  localparam int WIDTH = 72;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [8:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  instr_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 9'(i);
      wdata = {8'($urandom), 32'($urandom), 32'($urandom)};
      shadow[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 2 * DEPTH; n++) begin
      int k;
      k = (n * 37 + 11) % DEPTH;
      raddr = 9'(k);
      @(posedge clk); #1;
      checks++;
      if (rdata !== shadow[k]) begin
        failures++;
        $display("FAIL addr %0d: got %h expected %h", k, rdata, shadow[k]);
      end
      // Overwrite one location and read it in the next cycle.
      if (n % 64 == 5) begin
        @(negedge clk);
        we = 1'b1; waddr = 9'(k); wdata = ~shadow[k]; shadow[k] = wdata;
        @(negedge clk);
        we = 1'b0;
      end else begin
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
