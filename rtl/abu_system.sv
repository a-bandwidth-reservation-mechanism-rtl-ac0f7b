// abu_system: the budgeting layer of an FPGA with N_ABU HW-tasks.
//
// Every HW-task master port passes through its own ABU before it reaches one
// slave port of the AXI interconnect, which merges the tasks onto the path
// to memory (FPGA-to-PS port, DRAM controller). The interconnect, the PS and
// the HW-tasks are not part of this module: the task ports (`task_req`,
// `task_resp`) and the interconnect ports (`ic_req`, `ic_resp`) are brought
// out as arrays, one element per task, for the system to connect.
//
// Each ABU has its own budget B_i, period P_i and address segments in
// `cfg[i]`, its own interrupt `irq[i]` (raised on an address violation,
// cleared by `irq_clear[i]`) and status record. All ABUs share the clock and
// reset, so their periods start together and stay aligned when they are given
// the same P, which is how the bandwidth analysis assumes them to run.
//
// From the design description: one ABU per HW-task, in front of the
// interconnect, four of them in the evaluated system. Own choices: the
// port-level configuration and the array form of the ports.
module abu_system
  import abu_pkg::*;
#(
  parameter int unsigned N_ABU = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  abu_cfg_t    [N_ABU-1:0] cfg,
  input  logic        [N_ABU-1:0] irq_clear,
  input  axi_req_t    [N_ABU-1:0] task_req,
  output axi_resp_t   [N_ABU-1:0] task_resp,
  output axi_req_t    [N_ABU-1:0] ic_req,
  input  axi_resp_t   [N_ABU-1:0] ic_resp,
  output logic        [N_ABU-1:0] irq,
  output abu_status_t [N_ABU-1:0] status
);

  for (genvar i = 0; i < N_ABU; i++) begin : g_abu
    abu u_abu (
      .clk       (clk),
      .rst_n     (rst_n),
      .cfg       (cfg[i]),
      .irq_clear (irq_clear[i]),
      .s_req     (task_req[i]),
      .s_resp    (task_resp[i]),
      .m_req     (ic_req[i]),
      .m_resp    (ic_resp[i]),
      .irq       (irq[i]),
      .status    (status[i])
    );
  end

endmodule
