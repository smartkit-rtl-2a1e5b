// user_image_ram: the image RAM between the input stage and the display,
// one bit per pixel, 2^ADDR_BITS words (18 address bits, {y[7:0], x[9:0]}, as
// in the document). The input stage writes at the 27 MHz video clock; the
// display reads at the 25 MHz pixel clock. clear_all wipes the picture, one
// word per write clock, so that a new drawing can be started (own addition;
// the document does not say how the RAM is cleared).
//
// Timing: writes at the write clock edge; synchronous read, data one read
// clock after rd_addr. clearing is high while the wipe runs.
module user_image_ram #(
  parameter int unsigned ADDR_BITS = 18
) (
  input  logic                 wr_clk,
  input  logic                 wr_rst,
  input  logic                 we,
  input  logic [ADDR_BITS-1:0] wr_addr,
  input  logic                 wr_data,
  input  logic                 clear_all,
  output logic                 clearing,
  input  logic                 rd_clk,
  input  logic [ADDR_BITS-1:0] rd_addr,
  output logic                 rd_data
);

  logic                 mem [2**ADDR_BITS];
  logic [ADDR_BITS-1:0] clr_addr;

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      mem[clr_addr] <= 1'b0;
      clr_addr      <= clr_addr + 1'b1;
      if (&clr_addr) clearing <= 1'b0;
    end else if (clear_all) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (we) begin
      mem[wr_addr] <= wr_data;
    end
  end

  always_ff @(posedge rd_clk) rd_data <= mem[rd_addr];

endmodule
