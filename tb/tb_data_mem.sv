// tb_data_mem: random traffic on the data memory's two write ports (own and
// neighbour) and two read ports, checked against a shadow array. Covers the
// same-address collision (own write wins), read-first behaviour when a location
// is read and written in the same cycle, and the one-cycle read latency.
module tb_data_mem;
  localparam int DEPTH = 512;
  localparam int WIDTH = 48;
  logic clk = 1'b0;
  logic wea = 1'b0, web = 1'b0;
  logic [8:0] waddra = '0, waddrb = '0, raddr0 = '0, raddr1 = '0;
  logic [WIDTH-1:0] wdataa = '0, wdatab = '0, rdata0, rdata1;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0, collisions = 0;

  data_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] e0, e1;
    // Fill through both ports.
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      wea = 1'b1; waddra = 9'(i);     wdataa = {16'($urandom), 32'($urandom)};
      web = 1'b1; waddrb = 9'(i + 1); wdatab = {16'($urandom), 32'($urandom)};
      shadow[i] = wdataa; shadow[i + 1] = wdatab;
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      raddr0 = 9'($urandom % 16);
      raddr1 = 9'($urandom % 16);
      wea = 1'($urandom); waddra = 9'($urandom % 16); wdataa = {16'($urandom), 32'($urandom)};
      web = 1'($urandom); waddrb = 9'($urandom % 16); wdatab = {16'($urandom), 32'($urandom)};
      e0 = shadow[raddr0];
      e1 = shadow[raddr1];
      if (web) shadow[waddrb] = wdatab;
      if (wea) shadow[waddra] = wdataa;
      if (wea && web && waddra == waddrb) collisions++;
      @(posedge clk); #1;
      checks += 2;
      if (rdata0 !== e0) begin failures++; $display("FAIL port0 addr %0d", raddr0); end
      if (rdata1 !== e1) begin failures++; $display("FAIL port1 addr %0d", raddr1); end
    end
    // Read everything back once.
    @(negedge clk); wea = 1'b0; web = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); raddr0 = 9'(i); raddr1 = 9'(DEPTH - 1 - i);
      @(posedge clk); #1;
      checks += 2;
      if (rdata0 !== shadow[i]) failures++;
      if (rdata1 !== shadow[DEPTH - 1 - i]) failures++;
    end
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL no write collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
