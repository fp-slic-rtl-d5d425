// slic_tb_body.svh -- end-to-end test of fp_slic_top, shared by the
// reduced-size and the full-size testbench.
//
// The including module defines the localparams W, H, S, M, F, ITER, D0, DM,
// NFRAMES (frames streamed), NCHECK (frames whose output is checked; the
// rest only push the checked frames out of the delay lines), BUBBLE_PCT
// (chance of an idle input cycle), STALL_PCT (chance that the sink is not
// ready in a cycle), WATCHDOG (cycles) and STANDALONE (1: print
// the result line and end the simulation; 0: only raise `done`, for a
// harness that runs several configurations), and instantiates the design
// as `dut` on the signals declared here.  Input beats follow the AXI-stream
// rule: a pixel is held until s_tready takes it.
//
// Checks: every output ID of the checked frames against slic_ref_pkg's
// frame model; SOF/EOL copied to the right beats; the latency of every
// beat leaving the label stage (before the output FIFO), which must come
// exactly LAT clocks after the input pixel that is D0 + (ITER-1)*DM pixels
// later was taken.  It also counts how often each mechanism of the
// pipeline happened (window prime, shift, wrap to the next line,
// maximum-distance fill, bank reset, idle input cycles, sink not ready,
// input held back by the credit rule, pixels assigned away from their own
// square) and fails for one that never did.

  import slic_ref_pkg::*;

  localparam int NPIX = W * H;
  localparam int PDLY = D0 + (ITER - 1) * DM;   // delay in pixels
  localparam int LAT  = 4 * ITER + 1;           // extra clocks

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        s_tvalid = 1'b0, s_tuser = 1'b0, s_tlast = 1'b0;
  logic [23:0] s_tdata = '0;
  logic        s_tready;
  logic        m_tvalid, m_tuser, m_tlast;
  logic        m_tready = 1'b1;
  logic [15:0] m_tdata;

  int checks = 0, failures = 0;
  bit done = 1'b0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  int img_r[NFRAMES][], img_g[NFRAMES][], img_b[NFRAMES][];
  int ref_id[NFRAMES][];
  longint push_cyc[$];
  int     n_out = 0, n_lab = 0;
  int     moved = 0;

  // mechanism counters
  int n_prime = 0, n_shift = 0, n_wrap = 0, n_maxfill = 0, n_bankclr = 0, n_idle = 0;
  int n_sinkwait = 0, n_held = 0;

  // sink: not ready in a random STALL_PCT of the cycles
  always @(posedge clk) m_tready <= (($urandom % 100) >= STALL_PCT);

  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      make_image(W, H, 17 + 5 * f, img_r[f], img_g[f], img_b[f]);
      if (f < NCHECK) begin
        slic_frame(W, H, S, M, F, ITER, img_r[f], img_g[f], img_b[f], ref_id[f]);
        for (int p = 0; p < NPIX; p++)
          if (ref_id[f][p] != ((p / W) / S) * ((W + S - 1) / S) + (p % W) / S) moved++;
      end
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int p = 0; p < NPIX; p++) begin
        while (($urandom % 100) < BUBBLE_PCT) begin
          s_tvalid <= 1'b0;
          @(posedge clk);
          n_idle++;
        end
        s_tvalid <= 1'b1;
        s_tdata  <= {8'(img_r[f][p]), 8'(img_g[f][p]), 8'(img_b[f][p])};
        s_tuser  <= (p == 0);
        s_tlast  <= (p % W == W - 1);
        // s_tready only changes at a clock edge: look at it mid-cycle
        @(negedge clk);
        while (!s_tready) begin
          n_held++;
          @(negedge clk);
        end
        @(posedge clk);
        push_cyc.push_back(cyc);
      end
    end
    s_tvalid <= 1'b0;
    repeat (LAT + 4) @(posedge clk);
    while (m_tvalid) @(posedge clk);
    repeat (2) @(posedge clk);
    finish_test();
  end

  // output checker
  always @(posedge clk) begin
    if (rst_n && m_tvalid && !m_tready) n_sinkwait++;
    if (rst_n && m_tvalid && m_tready) begin
      int f, p;
      f = n_out / NPIX;
      p = n_out % NPIX;
      if (f < NCHECK) begin
        checks++;
        if (int'(m_tdata) != ref_id[f][p]) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH frame %0d pixel (%0d,%0d): id %0d expected %0d",
                     f, p % W, p / W, m_tdata, ref_id[f][p]);
        end
        checks++;
        if (m_tuser != (p == 0) || m_tlast != (p % W == W - 1)) begin
          failures++;
          if (failures < 10) $display("FLAGS wrong at frame %0d pixel %0d", f, p);
        end
      end
      n_out++;
    end
  end

  // latency: beat n_lab leaves the label stage LAT clocks after input
  // n_lab + PDLY was taken
  always @(posedge clk) begin
    if (rst_n && dut.lab_tvalid) begin
      if (n_lab < NCHECK * NPIX) begin
        checks++;
        if (n_lab + PDLY >= push_cyc.size() ||
            cyc - push_cyc[n_lab + PDLY] != longint'(LAT)) begin
          failures++;
          if (failures < 10) $display("LATENCY wrong at output %0d", n_lab);
        end
      end
      n_lab++;
    end
  end

  // mechanism monitors (first update unit and first store)
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.g_stage[1].u_update.load && !dut.g_stage[1].u_update.in.valid) n_prime++;
      if (dut.g_stage[1].u_update.load && dut.g_stage[1].u_update.in.valid) begin
        n_shift++;
        if (int'(dut.g_stage[1].u_update.col) == (W + S - 1) / S - 1) n_wrap++;
      end
      if (dut.g_stage[1].u_update.p1.valid)
        for (int k = 0; k < 9; k++)
          if (dut.g_stage[1].u_update.d1[k] == '1) n_maxfill++;
      if (ITER > 1 && dut.lab[1].valid && dut.lab[1].new_brow) n_bankclr++;
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("MECHANISM never happened: %s", what);
    end
  endtask

  task automatic finish_test();
    checks++;
    if (n_out < NCHECK * NPIX) begin
      failures++;
      $display("only %0d output beats", n_out);
    end
    need("window prime before the first pixel", n_prime);
    need("window shift", n_shift);
    need("window wrap to the next line", n_wrap);
    need("maximum-distance fill of wrong cells", n_maxfill);
    if (ITER > 1) need("store bank reset", n_bankclr);
    if (BUBBLE_PCT > 0) need("idle input cycle", n_idle);
    if (STALL_PCT > 0) begin
      need("sink not ready", n_sinkwait);
      need("input held back by the output FIFO credit", n_held);
    end
    need("pixel assigned outside its own square", moved);
    $display("%0dx%0d S=%0d ITER=%0d mechanisms: prime=%0d shift=%0d wrap=%0d maxfill=%0d bankreset=%0d idle=%0d sinkwait=%0d held=%0d moved=%0d",
             W, H, S, ITER, n_prime, n_shift, n_wrap, n_maxfill, n_bankclr, n_idle,
             n_sinkwait, n_held, moved);
    done = 1'b1;
    if (STANDALONE) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  initial begin
    #(longint'(WATCHDOG) * 10);
    if (!done) begin
      failures++;
      done = 1'b1;
      $display("WATCHDOG expired");
      if (STANDALONE) begin
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
