// tb_stub_output_formatter: self-checking test of trigger packet formatting.
//
// Packets with 0..40 random stub entries are given to the formatter once per
// 8 BX, in all four configurations (5 or 6 lines, with or without bend). The
// lines are collected over each 64-cycle frame (from frame_start) and the
// frame is rebuilt with line l of cycle c holding bit 383 - (c*L + l). It
// must equal a frame built here: header with the number of stubs that fit
// ((bits - 27) / stub width of 23 or 19, i.e. 15/18 with 6 lines and 12/15
// with 5) and the overflow flag set when entries were cut, then the entries.
// Line 5 must stay low in 5-line mode.
module tb_stub_output_formatter;
  import cic_pkg::*;
  localparam int NMAX = NMAX_STUBS, FR = 384;
  logic clk = 0, rst = 1, ce40 = 0, six_lines = 1, no_bend = 0, pkt_valid = 0;
  logic [HDR_W + SEL_STUB_W*NMAX - 1:0] packet = '0;
  logic [OUT_LINES_MAX-1:0] trig_out;
  logic frame_start;
  int checks = 0, failures = 0, cyc = 0, truncated = 0, complete = 0;

  stub_output_formatter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) ce40 <= ((cyc + 1) % 8 == 0);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  function automatic logic [FR-1:0] ref_frame(input logic [HDR_W + SEL_STUB_W*NMAX - 1:0] p,
                                             input bit six, input bit nb);
    trig_hdr_t h = p[HDR_W + SEL_STUB_W*NMAX - 1 -: HDR_W];
    int w = nb ? 19 : 23;
    int bits = six ? 384 : 320;
    int k = (bits - 27) / w;
    int ns = (h.nstubs < k) ? h.nstubs : k;
    logic [FR-1:0] f = '0;
    int pos = FR - 1;
    h.ovf = h.ovf | (h.nstubs > k);
    h.nstubs = 6'(ns);
    for (int b = HDR_W - 1; b >= 0; b--) f[pos--] = h[b];
    for (int i = 0; i < ns; i++) begin
      sel_stub_t s = p[SEL_STUB_W*(NMAX - i) - 1 -: SEL_STUB_W];
      logic [22:0] v = nb ? {4'b0, s.chip, s.bx, s.addr, s.aux} : s;
      for (int b = w - 1; b >= 0; b--) f[pos--] = v[b];
    end
    return f;
  endfunction

  initial begin
    logic [FR-1:0] got, exp_f;
    int n;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cfg = 0; cfg < 4; cfg++) begin
      six_lines = cfg[0];
      no_bend   = cfg[1];
      for (int pk = 0; pk < 8; pk++) begin
        trig_hdr_t h;
        n = (pk == 0) ? 0 : (pk == 1) ? 40 : int'($urandom % 41);
        h = '{fe_err: 8'($urandom), ovf: 1'($urandom % 4 == 0), block_id: 12'($urandom),
              nstubs: 6'(n)};
        packet = '0;
        packet[HDR_W + SEL_STUB_W*NMAX - 1 -: HDR_W] = h;
        for (int i = 0; i < n; i++)
          packet[SEL_STUB_W*(NMAX - i) - 1 -: SEL_STUB_W] = SEL_STUB_W'($urandom);
        exp_f = ref_frame(packet, six_lines, no_bend);
        if (exp_f[FR-28]) truncated++; else complete++;
        // Present the packet, then wait for the frame that carries it.
        @(negedge clk); pkt_valid = 1; @(negedge clk); pkt_valid = 0;
        do begin
          @(posedge clk); #1;
        end while (!frame_start);
        got = '0;
        for (int c = 0; c < 64; c++) begin
          for (int l = 0; l < 6; l++) begin
            if (l < (six_lines ? 6 : 5)) begin
              if (c * (six_lines ? 6 : 5) + l < FR) got[FR - 1 - (c * (six_lines ? 6 : 5) + l)] = trig_out[l];
            end else begin
              chk(trig_out[l] == 1'b0, "line 5 idle in 5-line mode");
            end
          end
          @(posedge clk); #1;
          if (c < 63) chk(!frame_start, "frame lasts 64 cycles");
        end
        chk(frame_start, "next frame starts after 64 cycles");
        chk(got == exp_f, "frame content");
        if (got != exp_f && failures < 4) $display("got %h\nexp %h", got, exp_f);
      end
    end
    chk(truncated > 0 && complete > 0, "both cut and complete packets seen");
    $display("packets complete: %0d, cut: %0d", complete, truncated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
