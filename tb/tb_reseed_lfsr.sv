// Self-checking testbench of reseed_lfsr (default 256-bit LFSR, 32 outputs).
// A reference model written here from the feedback rule
// new bit = s[255]^s[253]^s[250]^s[245] (shift towards the MSB) and the output
// rule out[j] = s[8j%256] ^ s[(11j+83)%256] ^ s[(13j+173)%256] is compared with the DUT
// every cycle while seeds are loaded and the register is stepped at random.
module tb_reseed_lfsr;
  localparam int unsigned L = 256;
  localparam int unsigned NO = 32;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0;
  logic [L-1:0] seed = '0;
  logic [NO-1:0] out;
  logic [L-1:0] state;
  int checks = 0, failures = 0;

  reseed_lfsr dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed), .step(step), .out(out), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [L-1:0] ref_next(logic [L-1:0] s);
    return {s[L-2:0], s[255] ^ s[253] ^ s[250] ^ s[245]};
  endfunction

  function automatic logic [NO-1:0] ref_out(logic [L-1:0] s);
    logic [NO-1:0] o;
    for (int j = 0; j < NO; j++) o[j] = s[(8 * j) % L] ^ s[(11 * j + 83) % L] ^ s[(13 * j + 173) % L];
    return o;
  endfunction

  logic [L-1:0] m;

  initial begin
    m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (state !== '0) begin failures++; $display("reset state %h", state); end
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      load = ($urandom_range(0, 19) == 0) || (c == 0);
      step = $urandom_range(0, 3) != 0;
      for (int k = 0; k < int'(L); k += 32) seed[k +: 32] = $urandom;
      @(posedge clk);
      if (load) m = seed;
      else if (step) m = ref_next(m);
      #1;
      checks++;
      if (state !== m || out !== ref_out(m)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: state %h exp %h out %h exp %h", c, state, m, out, ref_out(m));
      end
    end
    // A seed of a single 1 must return only after many steps (no short cycle).
    @(negedge clk); load = 1'b1; step = 1'b0; seed = L'(1);
    @(negedge clk); load = 1'b0; step = 1'b1;
    repeat (1000) begin
      @(negedge clk);
      checks++;
      if (state == L'(1)) begin failures++; $display("short cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
