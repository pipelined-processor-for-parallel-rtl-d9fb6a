// display_regs: the memory unit's run-time environment registers. DR.1 to
// DR.16 hold the base addresses of the 16 statically nested environments;
// HIGHMEM points to the top of the data stack; CURDISP names the display
// register of the current environment. The document gives the register
// set; the reset values (all display registers 0, HIGHMEM = HIGHMEM_INIT,
// CURDISP = 0) and the port shape are this design's own.
//
// rd_idx selects the display register seen on rd_base (read combinationally
// by the address adder). One display register write (dr_we) and one HIGHMEM
// write (hm_we) and one CURDISP write (cd_we) may happen per cycle, at the
// clock edge.
module display_regs #(
  parameter int unsigned AW           = 24,
  parameter logic [AW-1:0] HIGHMEM_INIT = AW'(1) << 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [3:0]    rd_idx,
  output logic [AW-1:0] rd_base,
  input  logic          dr_we,
  input  logic [3:0]    dr_idx,
  input  logic [AW-1:0] dr_wdata,
  input  logic          hm_we,
  input  logic [AW-1:0] hm_wdata,
  output logic [AW-1:0] highmem,
  input  logic          cd_we,
  input  logic [3:0]    cd_wdata,
  output logic [3:0]    curdisp
);
  logic [AW-1:0] dr [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) dr[i] <= '0;
      highmem <= HIGHMEM_INIT;
      curdisp <= '0;
    end else begin
      if (dr_we) dr[dr_idx] <= dr_wdata;
      if (hm_we) highmem <= hm_wdata;
      if (cd_we) curdisp <= cd_wdata;
    end
  end

  assign rd_base = dr[rd_idx];
endmodule
