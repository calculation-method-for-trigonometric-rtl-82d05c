// supplement_tb: random sign / integer bit / table words into the output
// register; checks the registered result one clock later, the forced zero
// fraction with the integer bit, the positive sign for a zero magnitude, and
// that reset clears the output.
module supplement_tb;
  import trig_pkg::*;

  logic         clk = 1'b0, rst;
  logic         sign, entire;
  logic [15:0]  douta;
  trig_result_t result;
  int checks = 0, failures = 0, n_negzero = 0;

  supplement dut (.clk(clk), .rst(rst), .sign(sign), .entire(entire), .douta(douta), .result(result));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [17:0] want, prev;
    logic [31:0] r;
    rst = 1'b1; sign = 1'b1; entire = 1'b1; douta = 16'hffff;
    @(posedge clk); #1;
    checks++; if (result != '0) failures++;
    rst = 1'b0;
    prev = '0;
    for (int i = 0; i < 2000; i++) begin
      r      = $urandom;
      sign   = r[0];
      entire = (r[3:1] == 3'd0);
      douta  = (r[6:4] == 3'd0) ? 16'd0 : r[31:16];
      if (sign && !entire && douta == 16'd0) n_negzero++;
      if (entire)              want = {sign, 1'b1, 16'd0};
      else if (douta == 16'd0) want = 18'd0;
      else                     want = {sign, 1'b0, douta};
      #1;
      checks++;  // registered: the new inputs do not show before the edge
      if (result != prev) failures++;
      @(posedge clk); #1;
      checks++;
      if (result != want) begin
        failures++;
        if (failures < 10) $display("in %b %b %h: got %h want %h", sign, entire, douta, result, want);
      end
      prev = want;
    end
    rst = 1'b1;
    @(posedge clk); #1;
    checks++; if (result != '0) failures++;
    checks++; if (n_negzero == 0) failures++;   // negative zero case was driven
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
