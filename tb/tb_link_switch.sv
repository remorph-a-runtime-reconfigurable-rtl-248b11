// tb_link_switch: programs random input selections into a 3 x 4 link switch and
// checks, for random outgoing link traffic, that every grain's incoming link is
// the outgoing link of the selected neighbour, or idle when the selection is
// none or points beyond the edge of the mesh. Also checks the reset state and
// that a selection takes effect at the next clock edge.
module tb_link_switch;
  import remorph_pkg::*;
  localparam int ROWS = 3;
  localparam int COLS = 4;
  localparam int N = ROWS * COLS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_idx = '0;
  in_sel_e cfg_sel = IN_NONE;
  in_sel_e sel [N];
  link_t out_links [N];
  link_t in_links [N];
  in_sel_e model_sel [N];
  int checks = 0, failures = 0, edge_cases = 0;

  link_switch #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic link_t expect_in(input int i);
    int r, c;
    r = i / COLS; c = i % COLS;
    case (model_sel[i])
      IN_NORTH: return (r > 0)        ? out_links[i - COLS] : '0;
      IN_EAST:  return (c < COLS - 1) ? out_links[i + 1]    : '0;
      IN_SOUTH: return (r < ROWS - 1) ? out_links[i + COLS] : '0;
      IN_WEST:  return (c > 0)        ? out_links[i - 1]    : '0;
      default:  return '0;
    endcase
  endfunction

  task automatic drive_and_check();
    for (int i = 0; i < N; i++)
      out_links[i] = '{we: 1'b1, addr: addr_t'($urandom), data: {16'($urandom), 32'($urandom)}};
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (in_links[i] !== expect_in(i)) begin
        failures++;
        $display("FAIL grain %0d sel %0d", i, model_sel[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin model_sel[i] = IN_NONE; out_links[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    drive_and_check();  // all open after reset
    for (int n = 0; n < 300; n++) begin
      int g;
      in_sel_e s;
      g = $urandom % N;
      s = in_sel_e'($urandom % 5);
      @(negedge clk);
      cfg_we = 1'b1; cfg_idx = 4'(g); cfg_sel = s;
      #1;
      drive_and_check();   // old configuration still active before the edge
      @(negedge clk);
      cfg_we = 1'b0;
      model_sel[g] = s;
      if ((s == IN_NORTH && g / COLS == 0) || (s == IN_WEST && g % COLS == 0) ||
          (s == IN_SOUTH && g / COLS == ROWS - 1) || (s == IN_EAST && g % COLS == COLS - 1))
        edge_cases++;
      drive_and_check();
      checks++;
      if (sel[g] !== s) failures++;
    end
    checks++;
    if (edge_cases == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
