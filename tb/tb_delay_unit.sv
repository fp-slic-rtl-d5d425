// tb_delay_unit -- checks the pixel-count delay line.
// Random beats with random idle cycles go in; every beat that comes out
// must be the one that went in DEPTH beats earlier, one clock after the
// input beat that pushed it out; nothing may come out before DEPTH beats
// were stored, and primed must rise exactly when the buffer is full.
module tb_delay_unit;
  import fp_slic_pkg::*;

  localparam int DEPTH = 37;
  localparam int NBEATS = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  pix_t in, out;
  logic in_ready, primed;
  int checks = 0, failures = 0;
  pix_t sent[$];
  int n_in = 0, n_out = 0;
  logic pushed_q = 1'b0;

  always #5 clk = ~clk;

  delay_unit #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .in, .in_ready, .out, .primed);

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (n_in < NBEATS) begin
      @(negedge clk);
      if ($urandom % 4 != 0) begin
        in.valid = 1'b1;
        in.sof = 1'($urandom); in.eol = 1'($urandom);
        in.r = 8'($urandom); in.g = 8'($urandom); in.b = 8'($urandom);
      end else in = '0;
    end
    @(negedge clk) in = '0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != NBEATS - DEPTH) begin
      failures++;
      $display("expected %0d beats out, got %0d", NBEATS - DEPTH, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // output of the previous cycle
      checks++;
      if (out.valid != (pushed_q && n_in > DEPTH)) begin
        failures++;
        $display("valid wrong at input count %0d", n_in);
      end
      if (out.valid) begin
        pix_t exp;
        exp = sent[n_out];
        checks++;
        if ({out.sof, out.eol, out.r, out.g, out.b} != {exp.sof, exp.eol, exp.r, exp.g, exp.b}) begin
          failures++;
          $display("data wrong for beat %0d", n_out);
        end
        n_out++;
      end
      checks++;
      if (primed != (n_in >= DEPTH)) begin
        failures++;
        $display("primed wrong at input count %0d", n_in);
      end
      checks++;
      if (!in_ready) failures++;
      pushed_q <= in.valid;
      if (in.valid) begin
        sent.push_back(in);
        n_in++;
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
