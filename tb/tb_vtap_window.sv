// tb_vtap_window - pushes numbered rows into the window, with idle clocks in
// between, and checks that win[r] always holds the row pushed 7-r pushes ago.
module tb_vtap_window;
  localparam int LANES = 4, W = 16;
  logic clk = 0, rst_n = 0, shift = 0;
  logic [W-1:0] din [LANES];
  logic [W-1:0] win [8][LANES];
  int checks = 0, failures = 0;
  int pushed = 0;

  vtap_window #(.LANES(LANES), .W(W)) dut (.clk, .rst_n, .shift, .din, .win);
  always #5 clk = ~clk;

  function automatic logic [W-1:0] val(int row, int lane);
    return W'(row * 37 + lane * 1001 + 5);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < LANES; x++) din[x] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      for (int x = 0; x < LANES; x++) din[x] = val(pushed, x);
      @(posedge clk);
      if (shift) pushed++;
      #1;
      for (int r = 0; r < 8; r++) begin
        int row;
        row = pushed - 8 + r;
        for (int x = 0; x < LANES; x++) begin
          logic [W-1:0] exp;
          exp = (row < 0) ? '0 : val(row, x);
          checks++;
          if (win[r][x] !== exp) begin
            failures++;
            $display("FAIL n=%0d r=%0d x=%0d got %0d exp %0d", n, r, x, win[r][x], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
