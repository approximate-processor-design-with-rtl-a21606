// Embedded IoT node: approximate RV32IM processor plus its Approximation
// Level Control Unit (top of the design).
//
// The level control unit holds the approximation levels of addition,
// subtraction and multiplication and drives them onto the processor's three
// 3-bit level buses. Outside agents (the user or a cloud service that judges
// the results) set the levels through mode_we/mode (a power-saving mode 0-7)
// or lvl_we/lvl_* (one level 0-3 per operation), at any time, also while a
// program runs. The processor is started with ap_start and signals the end of
// the program (ebreak) with ap_done; the load ports fill the instruction and
// data memories beforehand and Data_Result_Address/Data_Result read results
// back byte by byte. Memory sizes default to 40 KB of instruction memory and
// 90 KB of data memory at byte address 40 KB.
module approx_iot_node #(
  parameter int IMEM_BYTES = 40960,
  parameter int DMEM_BYTES = 92160,
  parameter int DMEM_BASE  = 40960
) (
  input  logic        ap_clk,
  input  logic        ap_rst,
  input  logic        ap_start,
  output logic        ap_done,
  output logic        ap_idle,
  output logic        ap_ready,
  input  logic        mode_we,
  input  logic [2:0]  mode,
  input  logic [2:0]  lvl_we,
  input  logic [1:0]  lvl_add,
  input  logic [1:0]  lvl_sub,
  input  logic [1:0]  lvl_mul,
  output logic [2:0]  approx_level_add,
  output logic [2:0]  approx_level_sub,
  output logic [2:0]  approx_level_mul,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  input  logic        dmem_we,
  input  logic [31:0] dmem_waddr,
  input  logic [31:0] dmem_wdata,
  input  logic [16:0] Data_Result_Address,
  output logic [7:0]  Data_Result
);
  approx_level_ctrl u_lvl (
    .clk             (ap_clk),
    .rst             (ap_rst),
    .mode_we         (mode_we),
    .mode            (mode),
    .lvl_we          (lvl_we),
    .lvl_add         (lvl_add),
    .lvl_sub         (lvl_sub),
    .lvl_mul         (lvl_mul),
    .approx_level_add(approx_level_add),
    .approx_level_sub(approx_level_sub),
    .approx_level_mul(approx_level_mul)
  );

  riscv_core #(
    .IMEM_BYTES(IMEM_BYTES),
    .DMEM_BYTES(DMEM_BYTES),
    .DMEM_BASE (DMEM_BASE)
  ) u_core (
    .ap_clk             (ap_clk),
    .ap_rst             (ap_rst),
    .ap_start           (ap_start),
    .ap_done            (ap_done),
    .ap_idle            (ap_idle),
    .ap_ready           (ap_ready),
    .approx_level_add   (approx_level_add),
    .approx_level_sub   (approx_level_sub),
    .approx_level_mul   (approx_level_mul),
    .imem_we            (imem_we),
    .imem_waddr         (imem_waddr),
    .imem_wdata         (imem_wdata),
    .dmem_we            (dmem_we),
    .dmem_waddr         (dmem_waddr),
    .dmem_wdata         (dmem_wdata),
    .Data_Result_Address(Data_Result_Address),
    .Data_Result        (Data_Result)
  );
endmodule
