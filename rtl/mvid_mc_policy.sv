// mvid_mc_policy: slow-down / pause policy of the host memory controller for MViD.
//
// While an MV-mul runs, requests to the DRAM are held in the controller's queue.
// Every T_IV cycles the policy adds the number of pending requests to the normal
// banks to num_req_nonMV and those to each MV-bank n to num_req_MV[n]; the sums are
// not cleared at the end of an interval, so a few requests cannot wait forever.
//   num_req_MV[n]  >= N_TH : pause MV-bank n (issue p-PRE) and slow the others down
//   num_req_nonMV  >= N_TH : slow all MV-banks down (the next normal command does it)
// A count is cleared when the action it triggered is taken (this design's choice).
// A paused bank is resumed (r-PRE) once no request to it is pending; the MV-banks
// speed up again (s-PRE) once no request to the normal banks is pending and no
// bank is paused. At most one p/s/r-PRE is issued per cycle. allow_nonmv_o and
// allow_mv_o tell the scheduler which queued requests may be sent now. With no
// MV-mul running everything is allowed and the state is cleared. Defaults are the
// document's evaluation settings (nTH = 4, tIV = 4 tCK).
module mvid_mc_policy #(
  parameter int unsigned NMVB = 4,
  parameter int unsigned T_IV = 4,
  parameter int unsigned N_TH = 4,
  parameter int unsigned CW   = 6     // width of the pending counts
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mv_active_i,
  input  logic [CW-1:0]            pend_nonmv_i,
  input  logic [NMVB-1:0][CW-1:0]  pend_mv_i,
  output logic                     slow_o,
  output logic [NMVB-1:0]          pause_o,
  output logic [NMVB-1:0]          send_ppre_o,
  output logic                     send_spre_o,
  output logic [NMVB-1:0]          send_rpre_o,
  output logic                     allow_nonmv_o,
  output logic [NMVB-1:0]          allow_mv_o
);
  localparam int unsigned SW = CW + 8;   // accumulated sums

  logic [$clog2(T_IV+1)-1:0] t;
  logic [SW-1:0]             num_nonmv;
  logic [NMVB-1:0][SW-1:0]   num_mv;

  assign allow_nonmv_o = !mv_active_i || slow_o;
  assign allow_mv_o    = mv_active_i ? pause_o : '1;

  // working copies of the sums inside the clocked block
  logic                    issued;
  logic [SW-1:0]           nn;
  logic [NMVB-1:0][SW-1:0] nm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issued      = 1'b0;
      nn          = '0;
      nm          = '0;
      t           <= '0;
      num_nonmv   <= '0;
      num_mv      <= '0;
      slow_o      <= 1'b0;
      pause_o     <= '0;
      send_ppre_o <= '0;
      send_spre_o <= 1'b0;
      send_rpre_o <= '0;
    end else begin
      send_ppre_o <= '0;
      send_spre_o <= 1'b0;
      send_rpre_o <= '0;
      issued = 1'b0;
      nn = num_nonmv;
      nm = num_mv;
      if (!mv_active_i) begin
        t       <= '0;
        nn      = '0;
        nm      = '0;
        slow_o  <= 1'b0;
        pause_o <= '0;
      end else begin
        // interval tick: accumulate pending requests
        if (32'(t) == T_IV - 1) begin
          t <= '0;
          nn = nn + SW'(pend_nonmv_i);
          for (int n = 0; n < NMVB; n++) nm[n] = nm[n] + SW'(pend_mv_i[n]);
          for (int n = 0; n < NMVB; n++)
            if (!issued && !pause_o[n] && nm[n] >= SW'(N_TH)) begin
              send_ppre_o[n] <= 1'b1;
              pause_o[n]     <= 1'b1;
              slow_o         <= 1'b1;
              nm[n]          = '0;
              issued         = 1'b1;
            end
          if (nn >= SW'(N_TH)) begin
            slow_o <= 1'b1;
            nn     = '0;
          end
        end else begin
          t <= t + 1'b1;
        end
        // leave pause / slow-down once the requests of that state are served
        for (int n = 0; n < NMVB; n++)
          if (!issued && pause_o[n] && pend_mv_i[n] == '0) begin
            send_rpre_o[n] <= 1'b1;
            pause_o[n]     <= 1'b0;
            issued         = 1'b1;
          end
        if (!issued && slow_o && pause_o == '0 && pend_nonmv_i == '0 && nn < SW'(N_TH)) begin
          send_spre_o <= 1'b1;
          slow_o      <= 1'b0;
        end
      end
      num_nonmv <= nn;
      num_mv    <= nm;
    end
  end

endmodule
