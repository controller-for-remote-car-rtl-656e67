// tb_clock_divider: self-checking testbench for clock_divider.
//
// Instantiates the divider at DIV = 7 and at its full default (100000, the
// 100 MHz to 1 kHz ratio), releases reset and measures the cycle of every
// tick pulse: the first must follow the DIV-th clock edge after reset, each
// later one must come exactly DIV cycles after the previous, and every pulse
// must last one cycle. A second reset in mid-count must restart the count.
module tb_clock_divider;

  localparam longint unsigned DIV_SMALL = 7;
  localparam longint unsigned DIV_FULL  = 100000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic tick_small, tick_full;

  int checks = 0;
  int failures = 0;
  longint unsigned cycle = 0;

  clock_divider #(.DIV(32'(DIV_SMALL))) dut_small (.clk, .rst, .tick(tick_small));
  clock_divider                    dut_full  (.clk, .rst, .tick(tick_full));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counts rising edges since reset release; a tick seen after edge n
  // was produced by edge n.
  longint unsigned last_small, last_full;
  longint unsigned n_small = 0, n_full = 0;

  always @(negedge clk) begin
    if (rst) begin
      n_small <= 0;
      n_full <= 0;
    end else begin
      if (tick_small) begin
        checks++;
        if (n_small == 0 ? (cycle != DIV_SMALL) : (cycle - last_small != DIV_SMALL)) begin
          failures++;
          $display("FAIL small tick %0d at edge %0d (last %0d)", n_small, cycle, last_small);
        end
        last_small = cycle;
        n_small <= n_small + 1;
      end
      if (tick_full) begin
        checks++;
        if (n_full == 0 ? (cycle != DIV_FULL) : (cycle - last_full != DIV_FULL)) begin
          failures++;
          $display("FAIL full tick %0d at edge %0d (last %0d)", n_full, cycle, last_full);
        end
        last_full = cycle;
        n_full <= n_full + 1;
      end
    end
  end

  always @(posedge clk) cycle <= rst ? 0 : cycle + 1;

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // a reset in mid-count
    repeat (DIV_SMALL * 3 + 4) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    repeat (3 * DIV_FULL + 5) @(negedge clk);
    checks++;
    if (n_full != 3) begin
      failures++;
      $display("FAIL: %0d full-size ticks in %0d cycles, expected 3", n_full, 3 * DIV_FULL + 5);
    end
    checks++;
    if (n_small != (3 * DIV_FULL + 5) / DIV_SMALL) begin
      failures++;
      $display("FAIL: %0d small ticks, expected %0d", n_small, (3 * DIV_FULL + 5) / DIV_SMALL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
