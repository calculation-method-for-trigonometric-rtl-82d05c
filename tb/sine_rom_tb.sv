// sine_rom_tb: reads every table entry in address order, one per clock, and
// compares each registered word with round(sin(i*0.05 deg)*2^16) (held at
// 65535) computed with real arithmetic. Also checks that the word appears
// one clock after its address and not before.
module sine_rom_tb;
  import trig_ref_pkg::*;

  localparam int STEPS = 20;
  localparam int DEPTH = 90 * STEPS;

  logic        clk = 1'b0;
  logic [10:0] addr;
  logic [15:0] douta;
  int checks = 0, failures = 0;

  sine_rom #(.STEPS_PER_DEG(STEPS)) dut (.clk(clk), .addr(addr), .douta(douta));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_w;
    addr = '0;
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      addr = 11'(i);
      @(posedge clk);
      #1;
      exp_w = table_word(i, STEPS);
      checks++;
      if (int'(douta) != exp_w) begin
        failures++;
        $display("addr %0d: got %0d expected %0d", i, douta, exp_w);
      end
      // registered read: a new address must not show before the next edge
      if (i + 1 < DEPTH) begin
        logic [15:0] held;
        held = douta;
        addr = 11'(i + 1);
        #1;
        checks++;
        if (douta != held) begin
          failures++;
          $display("addr %0d: output changed before the clock edge", i + 1);
        end
      end
    end
    // a few direct points
    addr = 11'd0;    @(posedge clk); #1; checks++; if (douta != 16'd0)     failures++;
    addr = 11'd600;  @(posedge clk); #1; checks++; if (douta != 16'd32768) failures++;  // sin 30
    addr = 11'd1799; @(posedge clk); #1; checks++; if (douta != 16'd65535) failures++;  // held
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
