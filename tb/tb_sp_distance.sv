// tb_sp_distance -- checks the Manhattan colour + weighted Manhattan
// position distance against an integer model, for random and for extreme
// operands, at the default compactness m = 80 and spacing S = 9
// (weight round(80 * 16 / 9) = 142 with four fractional bits).
module tb_sp_distance;
  import fp_slic_pkg::*;

  localparam int M = 80, S = 9, F = 4, DISTW = 24;
  localparam int WGT = 142;

  chan_t  pr, pg, pb, cr, cg, cb;
  coord_t px, py, cx, cy;
  logic [DISTW-1:0] distance;
  int checks = 0, failures = 0;

  sp_distance #(.M(M), .S(S), .F(F), .DISTW(DISTW)) dut (.*);

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic check_one();
    int exp;
    #1;
    exp = ((iabs(int'(pr) - int'(cr)) + iabs(int'(pg) - int'(cg)) + iabs(int'(pb) - int'(cb))) * 16)
          + WGT * (iabs(int'(px) - int'(cx)) + iabs(int'(py) - int'(cy)));
    checks++;
    if (int'(distance) != exp) begin
      failures++;
      if (failures < 10) $display("distance %0d expected %0d", distance, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      {pr, pg, pb, cr, cg, cb} = {8'($urandom), 8'($urandom), 8'($urandom),
                                  8'($urandom), 8'($urandom), 8'($urandom)};
      px = coord_t'($urandom % 481); py = coord_t'($urandom % 321);
      cx = coord_t'($urandom % 481); cy = coord_t'($urandom % 321);
      check_one();
    end
    // extremes
    {pr, pg, pb} = '1; {cr, cg, cb} = '0; px = 4095; py = 4095; cx = 0; cy = 0;
    check_one();
    {pr, pg, pb} = '0; {cr, cg, cb} = '1; px = 0; py = 0; cx = 4095; cy = 4095;
    check_one();
    {pr, pg, pb} = {8'd7, 8'd7, 8'd7}; {cr, cg, cb} = {8'd7, 8'd7, 8'd7};
    px = 5; py = 6; cx = 5; cy = 6;
    check_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
