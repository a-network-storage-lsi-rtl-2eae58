// ata_disk_model: behavioural model of an ATA disk for simulation only.
//
// Holds SECTORS sectors of 256 words, initialised to pattern(lba, word).  It
// answers PIO register cycles (task file writes, Status/Error reads; reading
// Status clears INTRQ) and runs READ DMA (C8h) and WRITE DMA (CAh) with the
// Ultra DMA signalling: as the sender it puts a word on DD and toggles DSTROBE
// one clock later, every STROBE_HALF clocks, pausing while HDMARDY- is
// negated; as the receiver it asserts DDMARDY- and takes a word on every
// HSTROBE edge.  At the end of a burst it compares the host's CRC, driven on
// DD as DMACK- is negated, with its own and counts matches and mismatches.
// Any other command completes at once with no data; an LBA beyond the disk
// ends with ERR and ABRT.
module ata_disk_model #(
  parameter int SECTORS     = 64,
  parameter int STROBE_HALF = 3,
  parameter int CMD_DELAY   = 20
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic [15:0] dd_from_host,
  input  logic        dd_host_oe,
  output logic [15:0] dd_to_host,
  input  logic [2:0]  da,
  input  logic        cs0_n,
  input  logic        cs1_n,
  input  logic        dior_n,
  input  logic        diow_n,
  output logic        iordy,
  output logic        dmarq,
  input  logic        dmack_n,
  output logic        intrq,
  output int          n_cmds,
  output int          n_words_in,
  output int          n_words_out,
  output int          n_crc_ok,
  output int          n_crc_bad,
  output logic [7:0]  last_cmd
);
  import soe_pkg::*;
  logic [15:0] mem [SECTORS*256];
  logic [7:0]  r_feat, r_count, r_lo, r_mid, r_hi, r_dev, r_status, r_error;
  logic        pdior, pdiow, pdmack;
  logic        go;

  function automatic logic [15:0] pattern(input int lba, input int w);
    return 16'((lba * 16'h0101) ^ (w * 3) ^ 16'h5A00);
  endfunction

  initial begin
    for (int s = 0; s < SECTORS; s++)
      for (int w = 0; w < 256; w++) mem[s*256 + w] = pattern(s, w);
    n_cmds = 0; n_words_in = 0; n_words_out = 0; n_crc_ok = 0; n_crc_bad = 0;
    last_cmd = 0; go = 0;
    {r_feat, r_count, r_lo, r_mid, r_hi, r_dev} = '0;
    r_status = 8'h50; r_error = 0; intrq = 0; dmarq = 0; iordy = 1; dd_to_host = 0;
    pdior = 1; pdiow = 1; pdmack = 1;
  end

  // PIO register cycles
  always @(posedge clk) begin
    pdior <= dior_n; pdiow <= diow_n;
    if (dmack_n && !cs0_n && pdiow && !diow_n) begin
      unique case (da)
        3'd1: r_feat  <= dd_from_host[7:0];
        3'd2: r_count <= dd_from_host[7:0];
        3'd3: r_lo    <= dd_from_host[7:0];
        3'd4: r_mid   <= dd_from_host[7:0];
        3'd5: r_hi    <= dd_from_host[7:0];
        3'd6: r_dev   <= dd_from_host[7:0];
        3'd7: begin last_cmd <= dd_from_host[7:0]; go <= 1; r_status <= 8'hD0; end
        default: ;
      endcase
    end
    if (dmack_n && pdior && !dior_n) begin
      if (!cs0_n && da == 3'd7) begin dd_to_host <= {8'h00, r_status}; intrq <= 0; end
      else if (!cs0_n && da == 3'd1) dd_to_host <= {8'h00, r_error};
      else if (!cs1_n && da == 3'd6) dd_to_host <= {8'h00, r_status};
      else dd_to_host <= 16'h0000;
    end
  end

  task automatic finish_cmd(input logic err);
    repeat (CMD_DELAY) @(posedge clk);
    r_status = err ? 8'h51 : 8'h50;
    r_error  = err ? 8'h04 : 8'h00;
    intrq = 1;
    n_cmds++;
  endtask

  task automatic check_crc(input logic [15:0] crc);
    // the host drives its CRC while negating DMACK-
    @(posedge dmack_n);
    @(posedge clk);
    if (dd_from_host == crc) n_crc_ok++; else n_crc_bad++;
  endtask

  initial begin
    forever begin
      int lba, cnt, words;
      logic [15:0] crc;
      logic strobe;
      @(posedge clk iff go);
      go = 0;
      lba = {r_dev[3:0], r_hi, r_mid, r_lo};
      cnt = (r_count == 0) ? 256 : int'(r_count);
      words = cnt * 256;
      crc = UDMA_CRC_INIT;
      if ((last_cmd == 8'hC8 || last_cmd == 8'hCA) && lba + cnt > SECTORS) begin
        finish_cmd(1);
      end else if (last_cmd == 8'hC8) begin           // READ DMA
        repeat (5) @(posedge clk);
        dmarq = 1;
        @(posedge clk iff (!dmack_n && !diow_n));
        strobe = 1; iordy = 1;
        for (int i = 0; i < words; i++) begin
          while (dior_n) @(posedge clk);              // HDMARDY- negated: pause
          dd_to_host = mem[lba*256 + i];
          crc = udma_crc_word(crc, dd_to_host);
          @(posedge clk);
          strobe = !strobe; iordy = strobe;
          n_words_out++;
          repeat (STROBE_HALF - 1) @(posedge clk);
        end
        @(posedge clk iff diow_n);                    // STOP
        dmarq = 0;
        check_crc(crc);
        iordy = 1;
        finish_cmd(0);
      end else if (last_cmd == 8'hCA) begin           // WRITE DMA
        int i;
        logic ph;
        repeat (5) @(posedge clk);
        dmarq = 1;
        @(posedge clk iff (!dmack_n && !diow_n));
        iordy = 0;                                    // DDMARDY- asserted
        i = 0; ph = dior_n;
        while (!diow_n) begin
          @(posedge clk);
          if (dior_n != ph && i < words) begin
            mem[lba*256 + i] = dd_from_host;
            crc = udma_crc_word(crc, dd_from_host);
            i++; n_words_in++;
          end
          ph = dior_n;
        end
        iordy = 1;
        dmarq = 0;
        check_crc(crc);
        finish_cmd(i != words);
      end else begin
        finish_cmd(0);
      end
    end
  end
endmodule
