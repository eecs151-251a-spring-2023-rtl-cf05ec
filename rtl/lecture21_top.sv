// lecture21_top: the lecture's example designs side by side.
//
// The main design is the linked-list summer. Its four micro-architectures
// (list_proc_a1 direct form, list_proc_a2 with NUMA, list_proc_a3 with one
// shared adder, list_proc_a4 pipelined by modulo scheduling) each read their
// own copy of the single-ported list memory (list_mem). All four copies are
// written through one load port (lm_we/lm_addr/lm_wdata), so they hold the
// same list, and one lp_start starts all four; each reports its own done
// and result. While lm_we is high a memory's address comes from lm_addr,
// otherwise from its processor, so load only while the processors are idle.
// The aligned-node variant list_proc_wide reads a 128 x 16-bit list_mem
// with its own load port (wm_*), and the aligned-node byte-wide variant
// list_proc_aligned reads a 256 x 8 list_mem loaded through am_*; both
// share lp_start.
//
// Beside it stand the smaller examples, each with its own ports: the
// R0/R1/ACC accumulator (acc_*), the regA/regB/regC datapath (abc_*), and
// the modulo-scheduled E=(A+B)+(C+D) engine (ms_*) with its dual-port
// memory. Memory port 1 of the latter is shared: while the engine is busy it
// belongs to the engine, otherwise to ms_addr/ms_we/ms_wdata/ms_rdata, which
// load A..D and read back E.
module lecture21_top
  import lp_pkg::*;
#(
  parameter int SUM_W = 8,
  parameter int N_ITER = 16
) (
  input  logic             clk,

  // list processors, architectures 1-4
  input  logic             lp_start,
  input  logic             lm_we,
  input  addr_t            lm_addr,
  input  word_t            lm_wdata,
  output logic [3:0]       lp_done,     // bit k-1 = architecture k
  output logic [SUM_W-1:0] lp_r [4],    // index k-1 = architecture k

  // aligned-node list processor with 16-bit memory
  input  logic                wm_we,
  input  logic [ADDR_W-2:0]   wm_addr,
  input  logic [2*WORD_W-1:0] wm_wdata,
  output logic                wide_done,
  output logic [SUM_W-1:0]    wide_r,

  // aligned-node list processor with byte-wide memory
  input  logic             am_we,
  input  addr_t            am_addr,
  input  word_t            am_wdata,
  output logic             aligned_done,
  output logic [SUM_W-1:0] aligned_r,

  // R0/R1/ACC example
  input  logic          acc_rst,
  input  logic          acc_init,
  input  logic [7:0]    acc_r0_in,
  input  logic [7:0]    acc_r1_in,
  input  logic [7:0]    acc_acc_in,
  input  logic          acc_go,
  output logic          acc_busy,
  output logic [7:0]    acc_r0,
  output logic [7:0]    acc_r1,
  output logic [7:0]    acc_acc,

  // regA/regB/regC example
  input  logic          abc_rst,
  input  logic [7:0]    abc_in,
  output logic [7:0]    abc_a,
  output logic [7:0]    abc_b,
  output logic [7:0]    abc_c,
  output logic [1:0]    abc_phase,

  // modulo-scheduled adder with dual-port memory
  input  logic          ms_rst,
  input  logic          ms_start,
  output logic          ms_busy,
  output logic          ms_done,
  input  logic [7:0]    ms_addr,
  input  logic          ms_we,
  input  logic [7:0]    ms_wdata,
  output logic [7:0]    ms_rdata
);

  // ---- list processors 1-4, one memory copy each ----
  addr_t proc_addr [4];
  addr_t mem_addr_mux [4];
  word_t mem_rdata [4];

  for (genvar k = 0; k < 4; k++) begin : g_mem
    assign mem_addr_mux[k] = lm_we ? lm_addr : proc_addr[k];
    list_mem #(.WIDTH(WORD_W), .ADDR_W(ADDR_W)) u_mem (
      .clk   (clk),
      .addr  (mem_addr_mux[k]),
      .we    (lm_we),
      .wdata (lm_wdata),
      .rdata (mem_rdata[k])
    );
  end

  list_proc_a1 #(.SUM_W(SUM_W)) u_a1 (
    .clk(clk), .start(lp_start), .mem_addr(proc_addr[0]), .mem_rdata(mem_rdata[0]),
    .done(lp_done[0]), .r(lp_r[0]));
  list_proc_a2 #(.SUM_W(SUM_W)) u_a2 (
    .clk(clk), .start(lp_start), .mem_addr(proc_addr[1]), .mem_rdata(mem_rdata[1]),
    .done(lp_done[1]), .r(lp_r[1]));
  list_proc_a3 #(.SUM_W(SUM_W)) u_a3 (
    .clk(clk), .start(lp_start), .mem_addr(proc_addr[2]), .mem_rdata(mem_rdata[2]),
    .done(lp_done[2]), .r(lp_r[2]));
  list_proc_a4 #(.SUM_W(SUM_W)) u_a4 (
    .clk(clk), .start(lp_start), .mem_addr(proc_addr[3]), .mem_rdata(mem_rdata[3]),
    .done(lp_done[3]), .r(lp_r[3]));

  // ---- aligned-node variant ----
  logic [ADDR_W-2:0]   wide_addr, wide_addr_mux;
  logic [2*WORD_W-1:0] wide_rdata;

  assign wide_addr_mux = wm_we ? wm_addr : wide_addr;

  list_mem #(.WIDTH(2*WORD_W), .ADDR_W(ADDR_W-1)) u_wide_mem (
    .clk   (clk),
    .addr  (wide_addr_mux),
    .we    (wm_we),
    .wdata (wm_wdata),
    .rdata (wide_rdata)
  );

  list_proc_wide #(.SUM_W(SUM_W)) u_wide (
    .clk(clk), .start(lp_start), .mem_addr(wide_addr), .mem_rdata(wide_rdata),
    .done(wide_done), .r(wide_r));

  // ---- aligned-node variant, byte-wide memory ----
  addr_t al_addr, al_addr_mux;
  word_t al_rdata;

  assign al_addr_mux = am_we ? am_addr : al_addr;

  list_mem #(.WIDTH(WORD_W), .ADDR_W(ADDR_W)) u_al_mem (
    .clk   (clk),
    .addr  (al_addr_mux),
    .we    (am_we),
    .wdata (am_wdata),
    .rdata (al_rdata)
  );

  list_proc_aligned #(.SUM_W(SUM_W)) u_aligned (
    .clk(clk), .start(lp_start), .mem_addr(al_addr), .mem_rdata(al_rdata),
    .done(aligned_done), .r(aligned_r));

  // ---- RT-language examples ----
  acc_example #(.W(8)) u_acc (
    .clk(clk), .rst(acc_rst), .init(acc_init), .r0_in(acc_r0_in), .r1_in(acc_r1_in),
    .acc_in(acc_acc_in), .go(acc_go), .busy(acc_busy), .r0(acc_r0), .r1(acc_r1),
    .acc(acc_acc));

  abc_example #(.W(8)) u_abc (
    .clk(clk), .rst(abc_rst), .in(abc_in), .reg_a(abc_a), .reg_b(abc_b),
    .reg_c(abc_c), .phase(abc_phase));

  // ---- modulo-scheduled adder ----
  logic [7:0] ms_addr1, ms_addr2, ms_wdata2, ms_rdata2, mp_addr1;
  logic       ms_we2;

  modsched_sum4 #(.W(8), .ADDR_W(8), .N_ITER(N_ITER)) u_ms (
    .clk(clk), .rst(ms_rst), .start(ms_start), .busy(ms_busy), .done(ms_done),
    .addr1(ms_addr1), .rdata1(ms_rdata),
    .addr2(ms_addr2), .we2(ms_we2), .wdata2(ms_wdata2), .rdata2(ms_rdata2));

  assign mp_addr1 = ms_busy ? ms_addr1 : ms_addr;

  dual_port_mem #(.WIDTH(8), .ADDR_W(8)) u_dpmem (
    .clk    (clk),
    .addr1  (mp_addr1),
    .we1    (ms_we && !ms_busy),
    .wdata1 (ms_wdata),
    .rdata1 (ms_rdata),
    .addr2  (ms_addr2),
    .we2    (ms_we2),
    .wdata2 (ms_wdata2),
    .rdata2 (ms_rdata2)
  );

endmodule
