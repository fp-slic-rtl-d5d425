// tb_sp_label -- checks the label unit: ID = ceil(W/S) * A_row + A_col
// (54 superpixels per row at the default 481 / 9), SOF and EOL copied to
// tuser and tlast, one clock of latency, nothing out for idle cycles.
module tb_sp_label;
  import fp_slic_pkg::*;

  localparam int W = 481, S = 9, IDW = 16;
  localparam int NC = 54;

  logic clk = 1'b0, rst_n = 1'b0;
  lab_pix_t in;
  logic m_tvalid, m_tuser, m_tlast;
  logic [IDW-1:0] m_tdata;
  logic m_tready = 1'b1;
  int checks = 0, failures = 0;
  int exp_id, exp_v, exp_u, exp_l;

  always #5 clk = ~clk;

  sp_label #(.W(W), .S(S), .IDW(IDW)) dut (.*);

  initial begin
    in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in = '0;
      in.valid = ($urandom % 4 != 0);
      in.lab_row = grid_t'($urandom % 36);
      in.lab_col = grid_t'($urandom % NC);
      in.sof = 1'($urandom); in.eol = 1'($urandom);
      exp_id = int'(in.lab_row) * NC + int'(in.lab_col);
      exp_v = in.valid; exp_u = in.sof; exp_l = in.eol;
      @(negedge clk);
      in.valid = 1'b0;
      checks++;
      if (int'(m_tvalid) != exp_v || (exp_v != 0 &&
          (int'(m_tdata) != exp_id || int'(m_tuser) != exp_u || int'(m_tlast) != exp_l))) begin
        failures++;
        if (failures < 10) $display("id %0d expected %0d", m_tdata, exp_id);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
