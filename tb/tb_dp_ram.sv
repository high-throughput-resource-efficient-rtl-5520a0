// Self-checking testbench for dp_ram: random writes and reads on both ports
// (never the same word on both at once) compared with an array model,
// including the one-clock read latency and read-before-write.
module tb_dp_ram;
  localparam int DEPTH = 1296;

  logic clk = 1'b0;
  logic we_a, we_b;
  logic [10:0] addr_a, addr_b;
  logic [5:0] din_a, din_b, dout_a, dout_b;
  logic [5:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dp_ram dut (.*);

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] exp_a, exp_b;
    // fill every word through alternating ports
    for (int w = 0; w < DEPTH; w += 2) begin
      we_a = 1'b1; addr_a = 11'(w);     din_a = 6'($urandom);
      we_b = 1'b1; addr_b = 11'(w + 1); din_b = 6'($urandom);
      model[w] = din_a; model[w + 1] = din_b;
      @(posedge clk); #1;
    end
    for (int t = 0; t < 20000; t++) begin
      int aa, ab;
      aa = $urandom_range(0, DEPTH - 1);
      do ab = $urandom_range(0, DEPTH - 1); while (ab == aa);
      we_a = 1'($urandom); we_b = 1'($urandom);
      addr_a = 11'(aa); addr_b = 11'(ab);
      din_a = 6'($urandom); din_b = 6'($urandom);
      exp_a = model[aa]; exp_b = model[ab];
      if (we_a) model[aa] = din_a;
      if (we_b) model[ab] = din_b;
      @(posedge clk); #1;
      checks++;
      if (dout_a != exp_a || dout_b != exp_b) begin
        failures++;
        if (failures < 20) $display("FAIL t%0d A[%0d]=%0d/%0d B[%0d]=%0d/%0d", t, aa, dout_a, exp_a, ab, dout_b, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
