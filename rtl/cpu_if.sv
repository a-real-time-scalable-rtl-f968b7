// cpu_if: CPU bus interface of the chip.
//
// The external CPU reaches the registers and coefficient memories of both
// cores through a 32-bit bus (the bus width is the one given for the CPU
// bus). Address bit 15 selects the core and bits 14:0 are passed to that
// core's controller. The request is registered once before it reaches the
// core; read data returns on cpu_rdata with cpu_rvalid two cycles after the
// read request. The two cores' interrupt lines are merged. The bus protocol
// (chip select, write enable, fixed read latency) is this design's own.
module cpu_if (
  input  logic               clk,
  input  logic               rst_n,
  // CPU bus
  input  logic               cpu_cs,
  input  logic               cpu_we,
  input  logic [15:0]        cpu_addr,
  input  logic [31:0]        cpu_wdata,
  output logic [31:0]        cpu_rdata,
  output logic               cpu_rvalid,
  output logic               cpu_irq,
  // to the two cores
  output logic [1:0]         reg_we,
  output logic [1:0]         reg_re,
  output logic [14:0]        reg_addr,
  output logic [31:0]        reg_wdata,
  input  logic [1:0][31:0]   reg_rdata,
  input  logic [1:0]         core_irq
);
  logic rd_pend, rd_pend2;
  logic rd_core, rd_core2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_we <= '0; reg_re <= '0; reg_addr <= '0; reg_wdata <= '0;
      rd_pend <= 1'b0; rd_core <= 1'b0; rd_pend2 <= 1'b0; rd_core2 <= 1'b0;
    end else begin
      reg_we    <= '0;
      reg_re    <= '0;
      if (cpu_cs) begin
        reg_addr  <= cpu_addr[14:0];
        reg_wdata <= cpu_wdata;
        if (cpu_we) reg_we[cpu_addr[15]] <= 1'b1;
        else        reg_re[cpu_addr[15]] <= 1'b1;
      end
      rd_pend    <= cpu_cs && !cpu_we;
      rd_core    <= cpu_addr[15];
      rd_pend2   <= rd_pend;
      rd_core2   <= rd_core;
    end
  end

  // the cores' read data is registered, so it is forwarded directly
  assign cpu_rvalid = rd_pend2;
  assign cpu_rdata  = reg_rdata[rd_core2];

  assign cpu_irq = |core_irq;
endmodule
