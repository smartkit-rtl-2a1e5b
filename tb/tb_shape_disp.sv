// tb_shape_disp: self-checking test of the display selection FSM.
// Random ROM addresses, def_region and user pixels are applied every clock
// while the test walks the FSM: no display before locked, IDLE -> ENABLE ->
// DISP_* for each def_sel value, back to IDLE on shape_reset. A reference
// built from the state-diagram rules and separate shape_rom instances
// predicts each RGB output (ROM shape in the corner only in a DISP state,
// user pixel white elsewhere, two clocks after the address); every clock is
// compared at the falling edge. Each of the four shapes must show at least
// one coloured corner pixel.
module tb_shape_disp;
  logic clk = 0, rst = 1, locked = 0, shape_reset = 0, enable = 0;
  logic [1:0] def_sel = 0;
  logic [13:0] addr = 0;
  logic region = 0, upix = 0;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0;
  int shown[4];
  always #10 clk = ~clk;

  shape_disp dut (.pixel_clock(clk), .reset(rst), .locked(locked), .shape_reset(shape_reset),
                  .enable(enable), .def_sel(def_sel), .rom_addr(addr), .def_region(region),
                  .user_pix(upix), .vga_out_red(r), .vga_out_green(g), .vga_out_blue(b));

  logic [23:0] ref_rom [4];
  shape_rom #(.SHAPE(0)) r0 (.clk(clk), .addr(addr), .data(ref_rom[0]));
  shape_rom #(.SHAPE(1)) r1 (.clk(clk), .addr(addr), .data(ref_rom[1]));
  shape_rom #(.SHAPE(2)) r2 (.clk(clk), .addr(addr), .data(ref_rom[2]));
  shape_rom #(.SHAPE(3)) r3 (.clk(clk), .addr(addr), .data(ref_rom[3]));

  // reference: 0 init, 1 idle, 2 enable, 3 showing shape m_shape
  int m_state = 0, m_shape = 0;
  logic m_region = 0;
  logic [23:0] m_rgb = 0;
  always @(posedge clk) begin
    logic [23:0] sh;
    sh = (m_state == 3) ? ref_rom[m_shape] : 24'h0;
    if (rst) begin
      m_state <= 0; m_region <= 0; m_rgb <= 0;
    end else begin
      m_rgb <= m_region ? sh : (upix ? 24'hFFFFFF : 24'h0);
      m_region <= region;
      case (m_state)
        0: if (locked) m_state <= 1;
        1: if (enable) m_state <= 2;
        2: begin m_state <= 3; m_shape <= def_sel; end
        default: if (shape_reset) m_state <= 1;
      endcase
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if ({r, g, b} !== m_rgb) begin
      failures++;
      if (failures < 10) $display("FAIL rgb %h expected %h (state %0d)", {r, g, b}, m_rgb, m_state);
    end
  end

  // count coloured corner pixels per shape (m_rgb of a corner pixel in a DISP state)
  logic corner_d1, corner_d2;
  always @(posedge clk) begin
    corner_d1 <= region && m_state == 3;
    corner_d2 <= corner_d1;
    if (corner_d2 && m_rgb != 0 && m_rgb != 24'hFFFFFF) shown[m_shape]++;
  end

  always @(posedge clk) begin
    #1;
    addr   = 14'($urandom);
    region = ($urandom % 3) != 0;
    upix   = $urandom % 2;
  end

  initial begin
    repeat (4) @(posedge clk);
    #2 rst = 0;
    enable = 1;                      // ignored until locked
    repeat (50) @(posedge clk);
    #2 locked = 1;
    enable = 0;
    repeat (20) @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      #2 def_sel = 2'(s); enable = 1;
      @(posedge clk); #2 enable = 0;
      repeat (3000) @(posedge clk);
      #2 shape_reset = 1;
      @(posedge clk); #2 shape_reset = 0;
      repeat (100) @(posedge clk);
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (shown[s] == 0) begin failures++; $display("FAIL shape %0d never shown", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
