// pio_engine: PIO engine of the ATA/ATAPI controller.
//
// Runs one ATA register cycle per request: the register address (CS0-/CS1-
// and DA[2:0]) is set up for T_SETUP clocks, DIOR- or DIOW- is asserted for
// T_ACTIVE clocks, and the cycle ends with T_RECOVER clocks of recovery.  On
// a write DD is driven from the start of the cycle to the end of the strobe;
// on a read DD is sampled in the last clock of the strobe.  done pulses in
// the clock after the cycle, with rdata valid.  The defaults give a 128 ns
// cycle at 125 MHz, inside ATA PIO mode 4 (25 ns setup, 70 ns strobe, 120 ns
// cycle); the design names the PIO engine, the timings are this design's.
module pio_engine #(
  parameter int T_SETUP   = 4,
  parameter int T_ACTIVE  = 9,
  parameter int T_RECOVER = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req,
  input  logic               we,
  input  soe_pkg::ata_addr_t addr,
  input  logic [15:0]        wdata,
  output logic               done,
  output logic [15:0]        rdata,
  output logic               busy,
  // ATA pins
  output logic [2:0]         da,
  output logic               cs0_n,
  output logic               cs1_n,
  output logic               dior_n,
  output logic               diow_n,
  output logic [15:0]        dd_out,
  output logic               dd_oe,
  input  logic [15:0]        dd_in
);
  typedef enum logic [1:0] {P_IDLE, P_SETUP, P_ACTIVE, P_RECOVER} st_e;
  st_e st;
  logic [4:0] cnt;
  logic       wr;

  assign busy = (st != P_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; cnt <= '0; wr <= 1'b0; done <= 1'b0; rdata <= '0;
      da <= '0; cs0_n <= 1'b1; cs1_n <= 1'b1; dior_n <= 1'b1; diow_n <= 1'b1;
      dd_out <= '0; dd_oe <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        P_IDLE: if (req) begin
          st <= P_SETUP; cnt <= '0; wr <= we;
          da <= addr.da; cs0_n <= !addr.cs0; cs1_n <= !addr.cs1;
          dd_out <= wdata; dd_oe <= we;
        end
        P_SETUP: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'(T_SETUP - 1)) begin
            st <= P_ACTIVE; cnt <= '0;
            if (wr) diow_n <= 1'b0; else dior_n <= 1'b0;
          end
        end
        P_ACTIVE: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'(T_ACTIVE - 1)) begin
            st <= P_RECOVER; cnt <= '0;
            dior_n <= 1'b1; diow_n <= 1'b1;
            if (!wr) rdata <= dd_in;
          end
        end
        P_RECOVER: begin
          cnt <= cnt + 5'd1;
          dd_oe <= 1'b0;
          if (cnt == 5'(T_RECOVER - 1)) begin
            st <= P_IDLE; done <= 1'b1;
            cs0_n <= 1'b1; cs1_n <= 1'b1;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
