// consented edges of the workload firmware: @index then {valid, src, h[15:13]}
@0000 81810
@0002 81800
@0100 81810
@0102 81800
@0180 81810
@0182 81800
@0200 81810
@0202 81800
@0280 81810
@0282 81800
@0300 81810
@0302 81800
@0380 81810
@0382 81800
@0480 8280c
@0481 82804
@0482 8281c
@0483 82814
@0484 8282c
@0485 82824
@0487 82834
@0501 83814
@0580 8280c
@0581 82804
@0582 8281c
@0583 82814
@0584 8282c
@0585 82824
@0587 82834
@0681 83814
@0683 83000
@0783 83804
